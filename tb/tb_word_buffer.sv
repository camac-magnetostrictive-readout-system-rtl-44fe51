// tb_word_buffer: random pushes and pops against a queue model, including runs
// into full and empty; checks order, full, valid and level.
module tb_word_buffer;
  logic clk = 0, rst_n = 0, clr = 0, push = 0, ready = 0;
  logic [31:0] din = 0, dout;
  logic full, valid;
  logic [4:0] level;
  logic [31:0] q[$];
  int checks = 0, failures = 0, fulls = 0;

  word_buffer dut (.clk(clk), .rst_n(rst_n), .clr(clr), .push(push), .din(din), .full(full),
                   .valid(valid), .ready(ready), .dout(dout), .level(level));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int phase;
      @(negedge clk);
      phase = (i / 500) % 2;        // alternate fill-biased and drain-biased
      push  = $urandom_range(0, 9) < (phase ? 3 : 7);
      ready = $urandom_range(0, 9) < (phase ? 7 : 3);
      din   = $urandom;
      #1;
      checks++;
      if (level != 5'(q.size()) || full != (q.size() == 16) || valid != (q.size() != 0)) failures++;
      if (valid) begin
        checks++;
        if (dout !== q[0]) failures++;
      end
      if (full) fulls++;
      @(posedge clk);
      if (valid && ready) void'(q.pop_front());
      if (push && !full) q.push_back(din);
    end
    checks++;
    if (fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
