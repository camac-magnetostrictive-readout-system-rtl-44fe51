// tb_readout_system: end-to-end test of the readout at reduced size: 5 ANNA
// modules (20 wands) in two crates of 4 stations, three stations empty, an
// 8-bit time counter (events of 256 clocks) and a 4-word buffer.
// Four events run back to back, each read out by the processor into a model
// computer with random pauses:
//   1. system tester, multiple-spark mode: 15 sparks on every wand, plus extra
//      wand pulses that must be gated off (word counter overflow);
//   2. chamber trigger with random sparks per wand, including wands with fewer
//      than 2 words and a spark at time 0 (which reads Q = 0);
//   3. system tester, memory-writing mode: a chosen pattern at a chosen location;
//   4. like 2, cut short by the computer's memory-overflow flag.
// The expected words are worked out from the pulse times alone: a pulse first
// sampled d clocks after the start is recorded as time d - 1. The test counts
// each mechanism (overflow gating, fiducial and Q errors, skipped empty
// stations, Q = 0 on the last word, buffer stall, abort, both tester modes,
// scope replay) and fails if one never happened.
module tb_readout_system;
  import anna_pkg::*;
  localparam int NCR = 2, SL = 4, MPC = 3, NM = 5, CS = 2, NW = 4 * NM;
  localparam int LEN = 256;
  localparam int MAXC = 40000;

  logic clk = 0, rst_n = 0, trigger_in = 0, camac_z = 0;
  logic [NW-1:0] wand_in = 0;
  logic t_go = 0, t_mode = 0, t_busy, t_cfg_err;
  logic [15:0] t_first = 0, t_pattern = 0;
  logic [3:0] t_nsparks = 0, t_loc = 0;
  cpu_word_t cpu_word;
  logic cpu_valid, cpu_ready = 0, cpu_mem_ovf = 0;
  logic [7:0] dac_x, dac_y;
  logic unblank, proc_busy, proc_done, proc_aborted, fid_error, ovf_error;
  logic [15:0] spark_total;
  logic [7:0] q_errors;
  logic [NM-1:0] module_busy;

  readout_system #(.NCRATES(NCR), .SLOTS(SL), .MODS_PER_CRATE(MPC), .N_MODULES(NM),
                   .COUNT_STAGES(CS), .BUF_DEPTH(4), .DISP_DEPTH(512)) dut (
    .clk(clk), .rst_n(rst_n), .trigger_in(trigger_in), .wand_in(wand_in), .camac_z(camac_z),
    .t_go(t_go), .t_mode(t_mode), .t_first(t_first), .t_nsparks(t_nsparks), .t_loc(t_loc),
    .t_pattern(t_pattern), .t_busy(t_busy), .t_cfg_err(t_cfg_err),
    .cpu_word(cpu_word), .cpu_valid(cpu_valid), .cpu_ready(cpu_ready), .cpu_mem_ovf(cpu_mem_ovf),
    .dac_x(dac_x), .dac_y(dac_y), .unblank(unblank),
    .proc_busy(proc_busy), .proc_done(proc_done), .proc_aborted(proc_aborted),
    .spark_total(spark_total), .q_errors(q_errors), .fid_error(fid_error), .ovf_error(ovf_error),
    .module_busy(module_busy));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  bit wev [NW][MAXC];
  int vals [NW][$];
  cpu_word_t exp_q[$], got_q[$];

  // mechanism counters
  int m_gated = 0, m_fid = 0, m_qerr = 0, m_ovf = 0, m_lastq = 0, m_stall = 0, m_abort = 0;
  int m_multi = 0, m_mem = 0, m_disp = 0, m_skip = 0;

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

  always @(negedge clk) begin
    int k; k = cyc + 1;
    for (int w = 0; w < NW; w++) wand_in[w] <= (k < MAXC) ? wev[w][k] : 1'b0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (cpu_valid && cpu_ready) got_q.push_back(cpu_word);
      if (dut.cmd.s1 && dut.cmd.f == 5'd0 && dut.bus_x && !dut.bus_q) m_lastq++;
      if (dut.buf_full && proc_busy) m_stall++;
      if (unblank) m_disp++;
    end
  end
  always @(negedge clk) cpu_ready <= ($urandom_range(0, 9) < 4);

  // A pulse recorded as time v after a start first sampled at edge k0.
  function automatic void pulse(int w, int k0, int v);
    wev[w][k0 + 1 + v] = 1; wev[w][k0 + 2 + v] = 1;
  endfunction

  // Expected stream from the per-wand recorded times.
  task automatic expect_event();
    int tot = 0; bit fid = 0, ovf = 0; cpu_word_t h;
    exp_q.delete();
    for (int w = 0; w < NW; w++) begin
      tot += vals[w].size();
      if (vals[w].size() < 2) fid = 1;
      if (vals[w].size() == 15) ovf = 1;
    end
    h = '0; h.header = 1; h.fid_err = fid; h.ovf_err = ovf; h.data = 16'(tot);
    exp_q.push_back(h);
    for (int w = 0; w < NW; w++) begin
      int m, c, n;
      m = w / 4; c = m / MPC; n = m % MPC + 1;
      foreach (vals[w][i]) begin
        cpu_word_t d;
        d = '0;
        d.q_err = (vals[w][i] == 0);
        d.fid_err = vals[w].size() < 2;
        d.ovf_err = vals[w].size() == 15;
        d.addr = '{crate: 3'(c), n: 5'(n), a: 2'(w % 4)};
        d.data = 16'(vals[w][i]);
        exp_q.push_back(d);
      end
    end
  endtask

  task automatic finish_event(input string name, input bit cut);
    wait (proc_done);
    repeat (30) @(negedge clk);
    if (!cut) begin
      chk(got_q.size() == exp_q.size(), $sformatf("%s: %0d words, expected %0d", name, got_q.size(), exp_q.size()));
      chk(!proc_aborted, {name, ": not aborted"});
    end else begin
      chk(proc_aborted && got_q.size() < exp_q.size(), {name, ": cut short"});
      if (proc_aborted) m_abort++;
    end
    foreach (got_q[i]) if (i < exp_q.size()) begin
      chk(got_q[i] == exp_q[i], $sformatf("%s: word %0d = %h expected %h", name, i, got_q[i], exp_q[i]));
      if (!got_q[i].header && got_q[i].fid_err) m_fid++;
      if (!got_q[i].header && got_q[i].ovf_err) m_ovf++;
      if (got_q[i].q_err) m_qerr++;
    end
    m_skip += int'(dut.u_proc.n_skipped);
    got_q.delete();
  endtask

  task automatic random_event(input int k0);
    for (int w = 0; w < NW; w++) begin
      int n, j;
      vals[w].delete();
      n = (w % 7 == 3) ? $urandom_range(0, 1) : $urandom_range(2, 14);
      j = 0;
      if (w == 1) begin vals[w].push_back(0); pulse(w, k0, 0); end
      while (vals[w].size() < n) begin
        j += $urandom_range(1, 3);
        vals[w].push_back(4 * j + 1);
        pulse(w, k0, 4 * j + 1);
      end
    end
  endtask

  initial begin
    int k0, f0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // ---- event 1: tester, 15 sparks on every wand; extra pulses gated off ----
    t_mode = 0; t_first = 16'd10; t_nsparks = 4'd15; t_go = 1;
    k0 = cyc + 2;                      // START first sampled at the edge after the next one
    for (int w = 0; w < NW; w++) begin
      vals[w].delete();
      for (int i = 0; i < 15; i++) vals[w].push_back(10 + 8 * i);
    end
    pulse(5, k0, 200); pulse(5, k0, 220); pulse(17, k0, 240);
    f0 = failures;
    @(negedge clk); t_go = 0;
    m_multi++;
    expect_event();
    finish_event("tester multi", 0);
    chk(ovf_error && spark_total == 16'(15 * NW), "event 1 total and overflow flag");
    // the three extra pulses were left out of the expected words
    if (failures == f0) m_gated += 3;

    // ---- event 2: chamber trigger with random sparks ----
    @(negedge clk);
    k0 = cyc + 1;
    trigger_in = 1;
    random_event(k0);
    @(negedge clk); trigger_in = 0;
    expect_event();
    finish_event("random", 0);
    chk(fid_error, "event 2 fiducial flag");
    chk(q_errors == 1, "event 2 one Q error");
    chk(unblank, "scope shows the event");
    chk(dac_x < 8'(NW), "scope x is a wand index");

    // ---- event 3: tester, memory-writing mode: 0x55 at location 3 ----
    @(negedge clk);
    t_mode = 1; t_loc = 4'd3; t_pattern = 16'h55; t_go = 1;
    for (int w = 0; w < NW; w++) begin
      vals[w].delete();
      for (int i = 0; i < 4; i++) vals[w].push_back(16'h55 - 2 * (3 - i));
    end
    @(negedge clk); t_go = 0;
    m_mem++;
    expect_event();
    finish_event("tester memory", 0);

    // ---- event 4: computer memory overflow ----
    @(negedge clk);
    k0 = cyc + 1;
    trigger_in = 1;
    random_event(k0);
    @(negedge clk); trigger_in = 0;
    expect_event();
    wait (got_q.size() == 12);
    cpu_mem_ovf = 1;
    wait (proc_done);
    @(negedge clk); cpu_mem_ovf = 0;
    finish_event("overflow abort", 1);

    $display("mechanisms: gated=%0d fid=%0d ovf=%0d qerr=%0d skip=%0d lastQ0=%0d stall=%0d abort=%0d multi=%0d mem=%0d disp=%0d",
             m_gated, m_fid, m_ovf, m_qerr, m_skip, m_lastq, m_stall, m_abort, m_multi, m_mem, m_disp);
    chk(m_gated > 0, "overflow gating happened");
    chk(m_fid > 0,   "fiducial error happened");
    chk(m_ovf > 0,   "word counter overflow flagged");
    chk(m_qerr > 0,  "Q error happened");
    chk(m_skip > 0,  "empty station skipped");
    chk(m_lastq > 0, "last word read with Q = 0");
    chk(m_stall > 0, "buffer stall happened");
    chk(m_abort > 0, "abort happened");
    chk(m_multi > 0 && m_mem > 0, "both tester modes ran");
    chk(m_disp > 0,  "scope replay happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
