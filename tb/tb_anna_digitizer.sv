// tb_anna_digitizer: one full event of the 4-channel module at its default
// 16-bit counter. Sparks are put on the wand inputs and on the bridged TEST
// input at known clocks; the expected time word of a pulse first sampled at
// clock edge kd after a start first sampled at edge k0 is kd - k0 - 1. Checks:
// the gate stays open for exactly 65536 clocks, a second start during the event
// is ignored, inputs before the start and after the overflow are ignored, a
// channel with more than 15 sparks keeps the first 15, each channel's word
// counter (F1), every data word and its Q = 1 (F0), the all-zero last word with
// Q = 0, X for valid and invalid commands, and Z.
module tb_anna_digitizer;
  import anna_pkg::*;
  localparam int NCYC = 66000 + 300;
  localparam int K0   = 200;          // edge at which start is first sampled

  logic clk = 0, rst_n = 0, start_in = 0, test_in = 0;
  logic [3:0] data_in = 0;
  logic n = 0, s1 = 0, s2 = 0, z = 0;
  logic [3:0] a = 0;
  logic [4:0] f = 0;
  logic [23:0] r;
  logic q, x, busy;

  int checks = 0, failures = 0;
  int cyc = 0;
  bit data_ev [4][NCYC];
  bit test_ev [NCYC];
  int exp_words [4][$];
  int busy_cycles = 0;

  anna_digitizer dut (.clk(clk), .rst_n(rst_n), .start_in(start_in), .test_in(test_in), .data_in(data_in),
    .n(n), .a(a), .f(f), .s1(s1), .s2(s2), .z(z), .r(r), .q(q), .x(x), .busy(busy));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (busy && rst_n) busy_cycles <= busy_cycles + 1;
  end

  initial begin : watchdog
    repeat (NCYC + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic camac(input int nn, input int aa, input int ff,
                       output logic [23:0] rr, output logic qq, output logic xx);
    @(negedge clk); n = (nn != 0); a = 4'(aa); f = 5'(ff);
    @(negedge clk); s1 = 1; rr = r; qq = q; xx = x;
    @(negedge clk); s1 = 0; s2 = 1;
    @(negedge clk); s2 = 0; n = 0;
  endtask

  // event schedule: pulses two clocks long, first sampled at the listed edge
  function automatic void add_data(int ch, int k);
    data_ev[ch][k] = 1; data_ev[ch][k+1] = 1;
  endfunction
  function automatic void add_test(int k);
    test_ev[k] = 1; test_ev[k+1] = 1;
  endfunction

  // driver: at the negedge before edge k drive what edge k must sample
  always @(negedge clk) begin
    int k;
    k = cyc + 1;
    if (k < NCYC) begin
      for (int c = 0; c < 4; c++) data_in[c] <= data_ev[c][k];
      test_in  <= test_ev[k];
      start_in <= (k == K0 || k == K0 + 1 || k == K0 + 30000 || k == K0 + 30001);
    end else if (k == NCYC) begin
      data_in <= 0; test_in <= 0; start_in <= 0;
    end
  end

  initial begin
    logic [23:0] rr; logic qq, xx;
    int list [4][$];
    // channel 0: a few sparks, one before the start (ignored)
    list[0] = '{K0 - 50, K0 + 2, K0 + 500, K0 + 20000, K0 + 65536};
    // channel 1: 20 sparks, only the first 15 are kept
    for (int i = 0; i < 20; i++) list[1].push_back(K0 + 1000 + 8 * i);
    // channel 2: one spark and one after the overflow (ignored)
    list[2] = '{K0 + 40000, K0 + 65537 + 10};
    // channel 3: nothing on the wand input
    foreach (list[c]) foreach (list[c][i]) add_data(c, list[c][i]);
    // TEST pulses go into all four channels
    add_test(K0 + 3000);
    add_test(K0 + 60000);
    for (int c = 0; c < 4; c++) begin
      list[c].push_back(K0 + 3000);
      list[c].push_back(K0 + 60000);
      list[c].sort();
      foreach (list[c][i])
        if (list[c][i] >= K0 + 1 && list[c][i] <= K0 + 65536 && exp_words[c].size() < 15)
          exp_words[c].push_back(list[c][i] - K0 - 1);
    end

    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (cyc == NCYC);
    chk(!busy, "gate closed after the event");
    chk(busy_cycles == 65536, $sformatf("gate open %0d clocks, expected 65536", busy_cycles));
    // word counters
    for (int c = 0; c < 4; c++) begin
      camac(1, c, 1, rr, qq, xx);
      chk(xx && qq && rr == 24'(exp_words[c].size()),
          $sformatf("ch%0d count %0d exp %0d", c, rr, exp_words[c].size()));
    end
    // data
    for (int c = 0; c < 4; c++) begin
      foreach (exp_words[c][i]) begin
        camac(1, c, 0, rr, qq, xx);
        chk(xx && qq && rr == 24'(exp_words[c][i]),
            $sformatf("ch%0d word %0d = %0d exp %0d q=%b", c, i, rr, exp_words[c][i], qq));
      end
      camac(1, c, 0, rr, qq, xx);
      chk(xx && !qq && rr == 0, $sformatf("ch%0d last word %0d q=%b", c, rr, qq));
    end
    // X only for the module's functions and subaddresses
    camac(1, 5, 0, rr, qq, xx); chk(!xx, "X for A5");
    camac(1, 0, 2, rr, qq, xx); chk(!xx, "X for F2");
    camac(0, 0, 1, rr, qq, xx); chk(!xx && rr == 0, "no N, no X");
    // Z closes the gate of a new event
    @(negedge clk); start_in = 1; @(negedge clk); start_in = 0;
    repeat (5) @(negedge clk);
    chk(busy, "new event started");
    z = 1; @(negedge clk); z = 0;
    chk(!busy, "Z closes the gate");
    camac(1, 0, 1, rr, qq, xx); chk(rr == 0, "Z clears the word counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
