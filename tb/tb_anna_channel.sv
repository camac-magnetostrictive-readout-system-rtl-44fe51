// tb_anna_channel: random arm, gate, spark, last-word and read-step traffic on
// one channel against a behavioural model of address counter, 15-word gating,
// last-word write and read pointer. Also counts that the gating at 15 sparks
// and the last-word write each happened.
module tb_anna_channel;
  import anna_pkg::*;
  logic clk = 0, rst_n = 0, arm = 0, gate = 0, hit = 0, last_we = 0, rd_step = 0;
  logic [15:0] tcount = 0, rdata;
  logic [3:0] word_count;
  logic full;
  int checks = 0, failures = 0, n_full = 0, n_last = 0, n_gated = 0;

  logic [15:0] mmem [16];
  bit          mval [16];
  int          mwa = 0, mrp = 0;

  anna_channel dut (.clk(clk), .rst_n(rst_n), .arm(arm), .gate(gate), .hit(hit), .last_we(last_we),
                    .tcount(tcount), .rd_step(rd_step), .rdata(rdata), .word_count(word_count), .full(full));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mval[i]) mval[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 50000; i++) begin
      @(negedge clk);
      arm     = ($urandom_range(0, 199) == 0);
      if ($urandom_range(0, 49) == 0) gate = ~gate;
      hit     = ($urandom_range(0, 3) == 0);
      last_we = ($urandom_range(0, 99) == 0);
      rd_step = ($urandom_range(0, 4) == 0);
      tcount  = 16'($urandom);
      #1;
      checks++;
      if (word_count != 4'(mwa) || full != (mwa == 15)) begin
        failures++;
        if (failures < 10) $display("FAIL count dut=%0d model=%0d", word_count, mwa);
      end
      if (mval[mrp]) begin
        checks++;
        if (rdata !== mmem[mrp]) begin
          failures++;
          if (failures < 10) $display("FAIL read ptr %0d got %h exp %h", mrp, rdata, mmem[mrp]);
        end
      end
      @(posedge clk);
      if (last_we) begin
        mmem[mwa] = '0; mval[mwa] = 1; n_last++;
      end else if (gate && hit && mwa < 15) begin
        mmem[mwa] = tcount; mval[mwa] = 1; mwa++;
      end else if (gate && hit) n_gated++;
      if (arm) begin mwa = 0; mrp = 0; end
      else if (rd_step) mrp = (mrp + 1) % 16;
      if (mwa == 15) n_full++;
    end
    checks++; if (n_gated == 0) failures++;
    checks++; if (n_last == 0) failures++;
    $display("gated=%0d last=%0d", n_gated, n_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
