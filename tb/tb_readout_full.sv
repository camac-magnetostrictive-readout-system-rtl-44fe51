// tb_readout_full: one complete event of the full-size system at its default
// parameters: 41 modules (164 wands) in two crates, 16-bit time counter
// (65536-clock event), 16-word buffer. The chamber trigger starts the event,
// every wand gets two fiducial sparks (near the start and near the end of the
// count) and a random number of track sparks between them; the computer takes
// words with random pauses. Checks the spark total, every word of the stream
// against the pulse times, and the replay on the scope.
module tb_readout_full;
  import anna_pkg::*;
  localparam int NM = 41, MPC = 21, NW = 4 * NM;
  localparam int MAXC = 140000;

  logic clk = 0, rst_n = 0, trigger_in = 0, camac_z = 0;
  logic [NW-1:0] wand_in = 0;
  logic t_busy, t_cfg_err;
  cpu_word_t cpu_word;
  logic cpu_valid, cpu_ready = 0, cpu_mem_ovf = 0;
  logic [7:0] dac_x, dac_y;
  logic unblank, proc_busy, proc_done, proc_aborted, fid_error, ovf_error;
  logic [15:0] spark_total;
  logic [7:0] q_errors;
  logic [NM-1:0] module_busy;

  readout_system dut (
    .clk(clk), .rst_n(rst_n), .trigger_in(trigger_in), .wand_in(wand_in), .camac_z(camac_z),
    .t_go(1'b0), .t_mode(1'b0), .t_first(16'd0), .t_nsparks(4'd0), .t_loc(4'd0),
    .t_pattern(16'd0), .t_busy(t_busy), .t_cfg_err(t_cfg_err),
    .cpu_word(cpu_word), .cpu_valid(cpu_valid), .cpu_ready(cpu_ready), .cpu_mem_ovf(cpu_mem_ovf),
    .dac_x(dac_x), .dac_y(dac_y), .unblank(unblank),
    .proc_busy(proc_busy), .proc_done(proc_done), .proc_aborted(proc_aborted),
    .spark_total(spark_total), .q_errors(q_errors), .fid_error(fid_error), .ovf_error(ovf_error),
    .module_busy(module_busy));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int vals [NW][$];
  int kpulse [NW][$];          // edges at which each wand's pulses are first sampled
  cpu_word_t exp_q[$], got_q[$];

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

  // two-clock pulses from the schedule
  always @(negedge clk) begin
    int k; k = cyc + 1;
    for (int w = 0; w < NW; w++) begin
      bit on; on = 0;
      foreach (kpulse[w][i]) if (k == kpulse[w][i] || k == kpulse[w][i] + 1) on = 1;
      wand_in[w] <= on;
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && cpu_valid && cpu_ready) got_q.push_back(cpu_word);
  end
  always @(negedge clk) cpu_ready <= ($urandom_range(0, 9) < 8);

  initial begin
    int k0, tot;
    cpu_word_t h;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    k0 = cyc + 1;
    tot = 0;
    for (int w = 0; w < NW; w++) begin
      int n, v;
      n = $urandom_range(0, 13);
      vals[w].push_back(5);                         // first fiducial
      v = 100;
      for (int i = 0; i < n; i++) begin
        v += $urandom_range(4, 4000);
        vals[w].push_back(v);
      end
      vals[w].push_back(65000);                     // last fiducial
      foreach (vals[w][i]) kpulse[w].push_back(k0 + 1 + vals[w][i]);
      tot += vals[w].size();
    end
    trigger_in = 1;
    @(negedge clk); trigger_in = 0;

    h = '0; h.header = 1; h.data = 16'(tot);
    exp_q.push_back(h);
    for (int w = 0; w < NW; w++) begin
      int m; m = w / 4;
      foreach (vals[w][i]) begin
        cpu_word_t d;
        d = '0;
        d.ovf_err = vals[w].size() == 15;
        d.addr = '{crate: 3'(m / MPC), n: 5'(m % MPC + 1), a: 2'(w % 4)};
        d.data = 16'(vals[w][i]);
        exp_q.push_back(d);
      end
      if (vals[w].size() == 15) exp_q[0].ovf_err = 1;
    end

    wait (proc_done);
    repeat (40) @(negedge clk);
    chk(spark_total == 16'(tot), $sformatf("total %0d expected %0d", spark_total, tot));
    chk(!fid_error && q_errors == 0 && !proc_aborted, "no errors");
    chk(got_q.size() == exp_q.size(), $sformatf("%0d words, expected %0d", got_q.size(), exp_q.size()));
    foreach (exp_q[i]) if (i < got_q.size())
      chk(got_q[i] == exp_q[i], $sformatf("word %0d = %h expected %h", i, got_q[i], exp_q[i]));
    chk(unblank, "scope shows the event");
    $display("event: %0d sparks, %0d words, done at clock %0d", tot, got_q.size(), cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
