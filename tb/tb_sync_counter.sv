// tb_sync_counter: checks the anticipated-carry counter against a plain
// integer model over more than one full wrap of the 16-bit default, with random
// enable gaps and clears; tc must be high exactly in the cycle at all ones with
// enable, and the counter must wrap after 65536 enabled clocks.
module tb_sync_counter;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [15:0] q;
  logic tc;
  int checks = 0, failures = 0;
  int unsigned model = 0;
  int cycles = 0;

  sync_counter dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .q(q), .tc(tc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%h model=%h tc=%b", what, q, model[15:0], tc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // full wrap with continuous enable: tc exactly once per 65536 clocks
    @(negedge clk);
    en = 1;
    for (int i = 0; i < 65536 + 20; i++) begin
      chk(q == model[15:0], "count");
      chk(tc == (en && model[15:0] == 16'hFFFF), "tc");
      @(posedge clk);
      model = (model + 1) & 32'hFFFF;
      @(negedge clk);
    end
    // random enables and clears
    for (int i = 0; i < 200000; i++) begin
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 999) == 0);
      #1;
      chk(q == model[15:0], "count r");
      chk(tc == (en && model[15:0] == 16'hFFFF), "tc r");
      @(posedge clk);
      if (clr) model = 0;
      else if (en) model = (model + 1) & 32'hFFFF;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
