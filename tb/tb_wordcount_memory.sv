// tb_wordcount_memory: random 4-bit field writes over all 256 counters; every
// read must return the last value written to that field, so writes must not
// disturb neighbouring fields of the same 64-bit row.
module tb_wordcount_memory;
  logic clk = 0, we = 0;
  logic [7:0] widx = 0, ridx = 0;
  logic [3:0] wdata = 0, rdata;
  logic [3:0] model [256];
  int checks = 0, failures = 0;

  wordcount_memory dut (.clk(clk), .we(we), .widx(widx), .wdata(wdata), .ridx(ridx), .rdata(rdata));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; widx = 8'(i); wdata = 4'($urandom); model[i] = wdata;
      @(posedge clk);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) begin
      ridx = 8'(i); #1; checks++;
      if (rdata !== model[i]) failures++;
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1; widx = 8'($urandom); wdata = 4'($urandom);
      ridx = 8'($urandom);
      #1; checks++;
      if (rdata !== model[ridx]) begin
        failures++;
        if (failures < 10) $display("FAIL idx %0d got %h exp %h", ridx, rdata, model[ridx]);
      end
      @(posedge clk);
      if (we) model[widx] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
