// tb_anna_tester: the tester's START and TEST pulse timing in both modes. A
// TEST pulse meant to be recorded as time P must rise P+1 clocks after the
// clock in which START is high. Multiple-spark mode: n pulses at first_t +
// 8*i. Memory-writing mode: loc+1 pulses at pattern - 2*(loc-i), the last one
// at pattern. Impossible requests must raise cfg_err and produce no START.
module tb_anna_tester;
  import anna_pkg::*;
  logic clk = 0, rst_n = 0, go = 0, mode = 0;
  logic [15:0] first_t = 0, pattern = 0;
  logic [3:0] n_sparks = 0, loc = 0;
  logic start_out, test_out, busy, cfg_err;
  int checks = 0, failures = 0;
  int cyc = 0, t_start = -1;
  int pulses[$];

  anna_tester dut (.clk(clk), .rst_n(rst_n), .go(go), .mode(mode), .first_t(first_t), .n_sparks(n_sparks),
    .loc(loc), .pattern(pattern), .start_out(start_out), .test_out(test_out), .busy(busy), .cfg_err(cfg_err));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && start_out) t_start <= cyc;
    if (rst_n && test_out)  pulses.push_back(cyc - t_start);
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit m, input int ft, input int ns, input int lc, input int pt, input bit expect_err);
    int exp[$];
    pulses.delete(); t_start = -1;
    @(negedge clk);
    mode = m; first_t = 16'(ft); n_sparks = 4'(ns); loc = 4'(lc); pattern = 16'(pt); go = 1;
    @(negedge clk); go = 0;
    repeat (2) @(negedge clk);
    while (busy) @(negedge clk);
    repeat (4) @(negedge clk);
    checks++;
    if (cfg_err != expect_err) begin failures++; $display("FAIL cfg_err=%b", cfg_err); end
    if (expect_err) begin
      checks++; if (t_start != -1 || pulses.size() != 0) failures++;
      return;
    end
    if (!m) for (int i = 0; i < ns; i++) exp.push_back(ft + 8 * i + 1);
    else    for (int i = 0; i <= lc; i++) exp.push_back(pt - 2 * (lc - i) + 1);
    checks++;
    if (pulses.size() != exp.size()) begin
      failures++; $display("FAIL %0d pulses, expected %0d", pulses.size(), exp.size());
    end else foreach (exp[i]) begin
      checks++;
      if (pulses[i] != exp[i]) begin
        failures++; $display("FAIL pulse %0d at +%0d, expected +%0d", i, pulses[i], exp[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 100, 15, 0, 0, 0);
    run(0, 0, 1, 0, 0, 0);
    run(0, 3000, 7, 0, 0, 0);
    run(1, 0, 0, 5, 16'hAAAA, 0);
    run(1, 0, 0, 0, 16'h5555, 0);
    run(1, 0, 0, 14, 40, 0);
    run(1, 0, 0, 10, 5, 1);      // pattern too small for the location
    run(0, 0, 0, 0, 0, 1);       // no sparks
    run(0, 65530, 3, 0, 0, 1);   // past the end of the count
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
