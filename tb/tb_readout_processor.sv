// tb_readout_processor: the processor against a behavioural model of two small
// crates of ANNA modules (word counters, data memories with read pointers,
// all-zero last word, X for occupied stations only). The event layout is
// random, with empty stations, wands with fewer than 2 words, full wands, a
// zero data word (Q = 0 during the data) and a wand whose word after the counter
// is not zero (Q = 1 on the extra read). Checks: no dataway command before the
// event has ended, the header word with the spark total and flags, every data
// word with its address and flags in order, the marked extra word, stalls on a
// small full buffer, the display writes, and in a second event the abort on
// computer memory overflow.
module tb_readout_processor;
  import anna_pkg::*;
  localparam int NCR = 2, SL = 4, CS = 2;   // 8-bit counter: event of 256 clocks

  logic clk = 0, rst_n = 0, start_in = 0;
  camac_cmd_t cmd;
  logic [23:0] r;
  logic q, x;
  logic buf_clr, buf_push, buf_full, buf_valid, cpu_ready = 0, cpu_mem_ovf = 0;
  cpu_word_t buf_word, cpu_word;
  logic [31:0] cpu_bits;
  logic disp_clr, disp_we;
  logic [7:0] disp_x;
  logic [15:0] disp_y;
  logic busy, done, aborted, any_fid, any_ovf;
  logic [15:0] total;
  logic [8:0] n_wands;
  logic [7:0] n_skipped, n_qerr;
  logic [2:0] lvl;

  int checks = 0, failures = 0, cyc = 0, start_cyc = 0, first_cmd = -1, stalls = 0, disp_n = 0;

  // crate model
  bit          pres [NCR][SL+1];
  int          cnt  [NCR][SL+1][4];
  logic [15:0] mem  [NCR][SL+1][4][16];
  int          rp   [NCR][SL+1][4];

  readout_processor #(.NCRATES(NCR), .SLOTS(SL), .COUNT_STAGES(CS)) dut (
    .clk(clk), .rst_n(rst_n), .start_in(start_in), .cmd(cmd), .r(r), .q(q), .x(x),
    .buf_clr(buf_clr), .buf_push(buf_push), .buf_word(buf_word), .buf_full(buf_full),
    .buf_empty(!buf_valid), .cpu_mem_ovf(cpu_mem_ovf),
    .disp_clr(disp_clr), .disp_we(disp_we), .disp_x(disp_x), .disp_y(disp_y),
    .busy(busy), .done(done), .aborted(aborted), .total(total), .n_wands(n_wands),
    .n_skipped(n_skipped), .n_qerr(n_qerr), .any_fid_err(any_fid), .any_ovf_err(any_ovf));

  word_buffer #(.WIDTH(32), .DEPTH(4)) u_buf (.clk(clk), .rst_n(rst_n), .clr(buf_clr), .push(buf_push),
    .din(buf_word), .full(buf_full), .valid(buf_valid), .ready(cpu_ready), .dout(cpu_bits), .level(lvl));
  assign cpu_word = cpu_bits;

  always #5 clk = ~clk;

  always_comb begin
    r = '0; q = 0; x = 0;
    if (cmd.n >= 1 && cmd.n <= SL && cmd.crate < NCR && pres[cmd.crate][cmd.n] && cmd.a < 4) begin
      if (cmd.f == 5'd1) begin
        x = 1; q = 1; r = 24'(cnt[cmd.crate][cmd.n][cmd.a]);
      end else if (cmd.f == 5'd0) begin
        x = 1;
        r = 24'(mem[cmd.crate][cmd.n][cmd.a][rp[cmd.crate][cmd.n][cmd.a] % 16]);
        q = (r != 0);
      end
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cmd.s2 && cmd.f == 0 && cmd.n >= 1 && cmd.n <= SL && cmd.crate < NCR && cmd.a < 4)
      rp[cmd.crate][cmd.n][cmd.a] <= rp[cmd.crate][cmd.n][cmd.a] + 1;
    if (rst_n && cmd.n != 0 && first_cmd < 0) first_cmd <= cyc;
    if (rst_n && buf_full && busy) stalls <= stalls + 1;
    if (rst_n && disp_we) disp_n <= disp_n + 1;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  cpu_word_t exp_q [$];
  cpu_word_t got_q [$];
  int exp_data_words;

  task automatic make_event();
    int tot = 0; bit fid = 0, ovf = 0;
    cpu_word_t w;
    exp_q.delete(); exp_data_words = 0;
    for (int c = 0; c < NCR; c++) for (int n = 1; n <= SL; n++) begin
      pres[c][n] = ($urandom_range(0, 3) != 0);
      for (int a = 0; a < 4; a++) begin
        int k;
        k = $urandom_range(0, 9);
        cnt[c][n][a] = (k == 0) ? 15 : (k == 1) ? $urandom_range(0, 1) : $urandom_range(2, 14);
        rp[c][n][a] = 0;
        for (int i = 0; i < 16; i++) mem[c][n][a][i] = (i < cnt[c][n][a]) ? 16'($urandom_range(1, 65535)) : 16'h0;
      end
    end
    pres[0][2] = 0;                         // at least one empty station
    pres[0][1] = 1; cnt[0][1][1] = 5;
    for (int i = 0; i < 16; i++) mem[0][1][1][i] = (i < 5) ? 16'(200 + i) : 16'h0;
    mem[0][1][1][2] = 16'h0;                // a data word that reads Q = 0
    pres[1][1] = 1; cnt[1][1][3] = 3;
    for (int i = 0; i < 16; i++) mem[1][1][3][i] = 16'(100 + i);
    mem[1][1][3][4] = 16'h0;                // word after the counter is not zero
    for (int c = 0; c < NCR; c++) for (int n = 1; n <= SL; n++) if (pres[c][n])
      for (int a = 0; a < 4; a++) begin
        tot += cnt[c][n][a];
        if (cnt[c][n][a] < 2) fid = 1;
        if (cnt[c][n][a] == 15) ovf = 1;
      end
    w = '0; w.header = 1; w.fid_err = fid; w.ovf_err = ovf; w.data = 16'(tot);
    exp_q.push_back(w);
    for (int c = 0; c < NCR; c++) for (int n = 1; n <= SL; n++) if (pres[c][n])
      for (int a = 0; a < 4; a++) begin
        for (int i = 0; i <= cnt[c][n][a]; i++) begin
          w = '0;
          w.fid_err = cnt[c][n][a] < 2;
          w.ovf_err = cnt[c][n][a] == 15;
          w.addr = '{crate: 3'(c), n: 5'(n), a: 2'(a)};
          w.data = mem[c][n][a][i];
          if (i < cnt[c][n][a]) begin
            w.q_err = (mem[c][n][a][i] == 0);
            exp_q.push_back(w); exp_data_words++;
          end else if (mem[c][n][a][i] != 0) begin
            w.q_err = 1;
            exp_q.push_back(w);
          end
        end
      end
  endtask

  // computer: random ready with long pauses
  always @(negedge clk) begin
    cpu_ready <= ($urandom_range(0, 99) < 30);
  end
  always @(posedge clk) if (rst_n && buf_valid && cpu_ready) got_q.push_back(cpu_word);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- event 1: full readout ----
    make_event();
    @(negedge clk); start_in = 1; start_cyc = cyc; @(negedge clk); start_in = 0;
    wait (done);
    repeat (20) @(negedge clk);
    chk(first_cmd >= start_cyc + 256, $sformatf("first command %0d clocks after start", first_cmd - start_cyc));
    chk(got_q.size() == exp_q.size(), $sformatf("%0d words, expected %0d", got_q.size(), exp_q.size()));
    foreach (exp_q[i]) if (i < got_q.size())
      chk(got_q[i] == exp_q[i], $sformatf("word %0d = %h expected %h", i, got_q[i], exp_q[i]));
    begin
      int nq = 0;
      foreach (exp_q[i]) if (exp_q[i].q_err) nq++;
      chk(nq >= 2 && n_qerr == 8'(nq), $sformatf("q errors %0d expected %0d", n_qerr, nq));
    end
    chk(!aborted, "not aborted");
    chk(stalls > 0, "buffer stall happened");
    chk(n_skipped > 0, "empty station skipped");
    chk(disp_n == exp_data_words, "display got every data word");
    // ---- event 2: computer memory overflow after 10 words ----
    got_q.delete(); disp_n = 0;
    make_event();
    @(negedge clk); start_in = 1; @(negedge clk); start_in = 0;
    wait (got_q.size() == 10);
    cpu_mem_ovf = 1;
    wait (done);
    cpu_mem_ovf = 0;
    repeat (40) @(negedge clk);
    chk(aborted, "aborted on memory overflow");
    chk(got_q.size() < exp_q.size(), "readout cut short");
    foreach (got_q[i]) chk(got_q[i] == exp_q[i], $sformatf("ev2 word %0d", i));
    $display("words=%0d stalls=%0d skipped=%0d", exp_q.size(), stalls, n_skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
