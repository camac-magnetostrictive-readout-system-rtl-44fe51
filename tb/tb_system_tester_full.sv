// tb_system_tester_full: the system tester driving the full-size default
// system (41 modules, 164 wands, 16-bit count) through the bridged TEST input.
//   1. Multiple-spark mode, the heaviest event the system holds: 15 sparks on
//      every wand, 8 clocks apart from a programmed starting point, 2460 sparks
//      in all; every wand must read back 15 words flagged as full.
//   2. Memory-writing mode: the alternating pattern 1010... (0xAAAA) written
//      into location 5 of every memory; location 5 of every wand must read it.
//   3. Memory-writing mode: 0101... (0x5555) into the highest data location, 14.
// The expected stream is computed from the requested tester settings alone.
module tb_system_tester_full;
  import anna_pkg::*;
  localparam int NM = 41, MPC = 21, NW = 4 * NM;
  localparam int MAXC = 400000;

  logic clk = 0, rst_n = 0;
  logic t_go = 0, t_mode = 0, t_busy, t_cfg_err;
  logic [15:0] t_first = 0, t_pattern = 0;
  logic [3:0] t_nsparks = 0, t_loc = 0;
  cpu_word_t cpu_word;
  logic cpu_valid, cpu_ready = 0;
  logic [7:0] dac_x, dac_y;
  logic unblank, proc_busy, proc_done, proc_aborted, fid_error, ovf_error;
  logic [15:0] spark_total;
  logic [7:0] q_errors;
  logic [NM-1:0] module_busy;

  readout_system dut (
    .clk(clk), .rst_n(rst_n), .trigger_in(1'b0), .wand_in('0), .camac_z(1'b0),
    .t_go(t_go), .t_mode(t_mode), .t_first(t_first), .t_nsparks(t_nsparks), .t_loc(t_loc),
    .t_pattern(t_pattern), .t_busy(t_busy), .t_cfg_err(t_cfg_err),
    .cpu_word(cpu_word), .cpu_valid(cpu_valid), .cpu_ready(cpu_ready), .cpu_mem_ovf(1'b0),
    .dac_x(dac_x), .dac_y(dac_y), .unblank(unblank),
    .proc_busy(proc_busy), .proc_done(proc_done), .proc_aborted(proc_aborted),
    .spark_total(spark_total), .q_errors(q_errors), .fid_error(fid_error), .ovf_error(ovf_error),
    .module_busy(module_busy));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  cpu_word_t got_q[$];

  initial begin : watchdog
    repeat (MAXC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && cpu_valid && cpu_ready) got_q.push_back(cpu_word);
  end
  always @(negedge clk) cpu_ready <= ($urandom_range(0, 9) < 7);

  // Runs one tester event; vals are the times every wand must hold.
  task automatic run(input string name, input bit mode, input int first_t, input int nsp,
                     input int loc, input int pattern, input int vals[$]);
    cpu_word_t e[$], h;
    int n;
    n = vals.size();
    h = '0; h.header = 1; h.ovf_err = (n == 15); h.fid_err = (n < 2); h.data = 16'(n * NW);
    e.push_back(h);
    for (int w = 0; w < NW; w++) begin
      int m; m = w / 4;
      foreach (vals[i]) begin
        cpu_word_t d;
        d = '0;
        d.ovf_err = (n == 15);
        d.fid_err = (n < 2);
        d.addr = '{crate: 3'(m / MPC), n: 5'(m % MPC + 1), a: 2'(w % 4)};
        d.data = 16'(vals[i]);
        e.push_back(d);
      end
    end
    got_q.delete();
    @(negedge clk);
    t_mode = mode; t_first = 16'(first_t); t_nsparks = 4'(nsp); t_loc = 4'(loc); t_pattern = 16'(pattern);
    t_go = 1;
    @(negedge clk); t_go = 0;
    @(negedge clk);
    chk(!t_cfg_err, {name, ": tester accepted the settings"});
    wait (proc_done);
    repeat (40) @(negedge clk);
    chk(spark_total == 16'(n * NW), $sformatf("%s: total %0d expected %0d", name, spark_total, n * NW));
    chk(got_q.size() == e.size(), $sformatf("%s: %0d words, expected %0d", name, got_q.size(), e.size()));
    foreach (e[i]) if (i < got_q.size())
      chk(got_q[i] == e[i], $sformatf("%s: word %0d = %h expected %h", name, i, got_q[i], e[i]));
    if (mode) begin
      // the pattern sits in location loc of every wand
      for (int w = 0; w < NW; w++)
        chk(got_q[1 + w * n + loc].data == 16'(pattern), $sformatf("%s: wand %0d location %0d", name, w, loc));
    end
    $display("%s: %0d words, finished at clock %0d", name, got_q.size(), cyc);
  endtask

  initial begin
    int v[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    v.delete(); for (int i = 0; i < 15; i++) v.push_back(1000 + 8 * i);
    run("multiple spark", 0, 1000, 15, 0, 0, v);
    chk(ovf_error, "full wands flagged");
    v.delete(); for (int i = 0; i <= 5; i++) v.push_back(16'hAAAA - 2 * (5 - i));
    run("memory 0xAAAA @5", 1, 0, 0, 5, 16'hAAAA, v);
    v.delete(); for (int i = 0; i <= 14; i++) v.push_back(16'h5555 - 2 * (14 - i));
    run("memory 0x5555 @14", 1, 0, 0, 14, 16'h5555, v);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
