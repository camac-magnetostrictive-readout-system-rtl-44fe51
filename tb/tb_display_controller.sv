// tb_display_controller: stores random points during a simulated readout, then
// after done checks that the x/y codes replay the points in order, each for
// DWELL clocks with the beam unblanked, wrapping back to the first point; clr
// stops the replay, and a done with no points leaves the beam blanked.
module tb_display_controller;
  import anna_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, we = 0, done = 0;
  logic [7:0] px = 0;
  logic [15:0] py = 0;
  logic [7:0] dac_x, dac_y;
  logic unblank;
  logic [12:0] n_points;
  logic [7:0] ex [$];
  logic [7:0] ey [$];
  int checks = 0, failures = 0;

  display_controller dut (.clk(clk), .rst_n(rst_n), .clr(clr), .we(we), .px(px), .py(py), .done(done),
    .dac_x(dac_x), .dac_y(dac_y), .unblank(unblank), .n_points(n_points));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < 37; i++) begin
      we = 1; px = 8'($urandom); py = 16'($urandom);
      ex.push_back(px); ey.push_back(py[15:8]);
      @(negedge clk);
      we = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    checks++; if (n_points != 37) failures++;
    checks++; if (unblank) failures++;
    done = 1; @(negedge clk); done = 0;
    for (int rep = 0; rep < 2 * 37; rep++) begin
      for (int d = 0; d < 4; d++) begin
        checks++;
        if (!unblank || dac_x != ex[rep % 37] || dac_y != ey[rep % 37]) begin
          failures++;
          if (failures < 10) $display("FAIL point %0d: %h,%h exp %h,%h", rep, dac_x, dac_y, ex[rep%37], ey[rep%37]);
        end
        @(negedge clk);
      end
    end
    clr = 1; @(negedge clk); clr = 0;
    checks++; if (unblank || n_points != 0) failures++;
    done = 1; @(negedge clk); done = 0;
    repeat (3) @(negedge clk);
    checks++; if (unblank) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
