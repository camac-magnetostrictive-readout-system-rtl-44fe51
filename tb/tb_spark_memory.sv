// tb_spark_memory: random writes and asynchronous reads against an array model.
module tb_spark_memory;
  logic clk = 0, we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  spark_memory dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every location first
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; waddr = 4'(i); wdata = 16'($urandom); model[i] = wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we = 0;
      raddr = 4'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", raddr, rdata, model[raddr]);
      end
      we = $urandom_range(0, 1) == 1; waddr = 4'($urandom); wdata = 16'($urandom);
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
