// tb_input_sync: random input levels; level must follow the input two clocks
// later and pulse must mark each rising edge of that delayed level for one clock.
module tb_input_sync;
  logic clk = 0, rst_n = 0, d = 0, level, pulse;
  int checks = 0, failures = 0;
  logic [2:0] hist = '0;   // input as sampled at the last three edges

  input_sync dut (.clk(clk), .rst_n(rst_n), .d(d), .level(level), .pulse(pulse));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (level !== hist[1] || pulse !== (hist[1] & ~hist[2])) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d level=%b pulse=%b hist=%b", i, level, pulse, hist);
      end
      d = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      hist = {hist[1:0], d};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
