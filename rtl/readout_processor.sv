// readout_processor: reads a whole event out of the ANNA modules and hands it
// to the computer as 32-bit words.
//
// It is started by the same bridged start pulse as the modules and times the
// event itself: when its own copy of the time counter overflows (3.3 ms at
// 20 MHz for 16 bits) plus a few clocks, all modules have written their last
// word. Then it works in two passes over every crate and station:
//
//  1. Spark computation. For each wand it reads the module's word counter
//     (F1), stores it in the 16x64 word-counter memory and adds it to the spark
//     total. A station that does not answer with X is empty and skipped. A wand
//     with fewer than 2 words (the two fiducials) or with a full counter (15,
//     later sparks lost) is flagged.
//  2. The total goes to the computer as the first (header) word. Once the
//     computer has taken it, the processor reads, wand by wand, as many data
//     words (F0) as the stored counter says, and packs each with the wand
//     address into one 32-bit word. Every data read must give Q = 1; one more
//     read must then give Q = 0, the module's all-zero last word. A wrong Q
//     marks the word (q_err); a Q = 1 on the extra read sends that word too,
//     marked. Empty stations are again skipped by X. The pass stops early when
//     the computer signals memory overflow; it stalls while the buffer is full.
//
// The document gives the two passes, the checks, the memory size and the word
// contents; the CAMAC function codes, the 32-bit word layout (anna_pkg), the
// three-clock dataway cycle (setup, S1, S2), the end-of-event margin and the
// buffer handshake are own choices. The document connects the processor to
// the crates through a branch highway and crate controllers; here it drives the
// crate dataways directly.
//
// Timing: each dataway cycle takes 3 clocks, plus 1 clock to evaluate (and to
// push a word); pass 1 costs 4 clocks per command, pass 2 4 clocks per read
// plus 1 per wand.
module readout_processor
  import anna_pkg::*;
#(
  parameter int unsigned NCRATES      = 2,   // document: 2 crate controllers
  parameter int unsigned SLOTS        = 23,  // stations scanned per crate
  parameter int unsigned COUNT_STAGES = 4,   // must match the modules' time counter
  parameter int unsigned END_MARGIN   = 4    // clocks after overflow before reading
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start_in,
  // dataway of the selected crate
  output camac_cmd_t            cmd,
  input  logic [CAMAC_R_W-1:0]  r,
  input  logic                  q,
  input  logic                  x,
  // word buffer
  output logic                  buf_clr,
  output logic                  buf_push,
  output cpu_word_t             buf_word,
  input  logic                  buf_full,
  input  logic                  buf_empty,
  input  logic                  cpu_mem_ovf,
  // display memory
  output logic                  disp_clr,
  output logic                  disp_we,
  output logic [WAND_IDX_W-1:0] disp_x,
  output logic [TIME_W-1:0]     disp_y,
  // status
  output logic                  busy,
  output logic                  done,
  output logic                  aborted,
  output logic [15:0]           total,
  output logic [WAND_IDX_W:0]   n_wands,
  output logic [7:0]            n_skipped,
  output logic [7:0]            n_qerr,
  output logic                  any_fid_err,
  output logic                  any_ovf_err
);

  typedef enum logic [3:0] {
    S_IDLE, S_WAIT, S_MARGIN, S_CNT_CYC, S_CNT_EVAL, S_HDR, S_HDR_WAIT,
    S_RD_LOAD, S_RD_CYC, S_RD_EVAL, S_DONE
  } state_e;

  typedef struct packed {
    logic [2:0] c;
    logic [4:0] n;
    logic [1:0] a;
    logic       wrap;     // went past the last crate
  } pos_t;

  state_e state;
  logic [1:0] phase;
  logic [2:0] c_r;
  logic [4:0] n_r;
  logic [1:0] a_r;
  logic [WAND_IDX_W-1:0] idx;
  logic [ADDR_W-1:0] cnt_cur, i_r;
  logic [CAMAC_R_W-1:0] r_s;
  logic q_s, x_s;
  logic [7:0] margin;

  // ---- start and event timer ----
  logic start_p, tmr_tc;
  input_sync u_sync_start (.clk(clk), .rst_n(rst_n), .d(start_in), .level(), .pulse(start_p));

  logic accept_start;
  assign accept_start = start_p && (state == S_IDLE);

  sync_counter #(.STAGES(COUNT_STAGES), .STAGE_W(4)) u_timer (
    .clk(clk), .rst_n(rst_n), .clr(accept_start), .en(state == S_WAIT), .q(), .tc(tmr_tc)
  );

  // ---- word counter memory ----
  logic                  wc_we;
  logic [ADDR_W-1:0]     wc_rdata;
  wordcount_memory #(.ROWS(16), .ROW_W(64), .FIELD_W(ADDR_W)) u_wc (
    .clk(clk), .we(wc_we), .widx(idx), .wdata(r_s[ADDR_W-1:0]), .ridx(idx), .rdata(wc_rdata)
  );

  // ---- position stepping ----
  function automatic pos_t advance(input logic [2:0] c, input logic [4:0] n,
                                   input logic [1:0] a, input logic whole_station);
    pos_t p;
    p = '{c: c, n: n, a: a, wrap: 1'b0};
    if (!whole_station && a != 2'(CHANNELS - 1)) begin
      p.a = a + 1'b1;
    end else begin
      p.a = '0;
      if (n != 5'(SLOTS)) p.n = n + 1'b1;
      else begin
        p.n = 5'd1;
        if (c != 3'(NCRATES - 1)) p.c = c + 1'b1;
        else p.wrap = 1'b1;
      end
    end
    return p;
  endfunction

  logic  on_cycle;
  assign on_cycle = (state == S_CNT_CYC) || (state == S_RD_CYC);

  always_comb begin
    cmd       = '0;
    cmd.crate = c_r;
    cmd.a     = {2'b00, a_r};
    cmd.f     = (state == S_RD_CYC) ? F_READ_DATA : F_READ_COUNT;
    if (on_cycle) begin
      cmd.n  = n_r;
      cmd.s1 = (phase == 2'd1);
      cmd.s2 = (phase == 2'd2);
    end
  end

  // ---- pass-2 word assembly (combinational, used in S_RD_EVAL) ----
  logic      need_push, chan_fid, chan_ovf, extra_word;
  cpu_word_t data_word;

  assign chan_fid   = (cnt_cur < 2);
  assign chan_ovf   = (cnt_cur == ADDR_W'(MAX_SPARKS));
  assign extra_word = (i_r == cnt_cur);

  always_comb begin
    data_word         = '0;
    data_word.header  = 1'b0;
    data_word.q_err   = extra_word ? 1'b1 : !q_s;
    data_word.fid_err = chan_fid;
    data_word.ovf_err = chan_ovf;
    data_word.addr    = '{crate: c_r, n: n_r, a: a_r};
    data_word.data    = r_s[TIME_W-1:0];
  end

  assign need_push = (state == S_RD_EVAL) && !cpu_mem_ovf && !(i_r == '0 && a_r == '0 && !x_s)
                     && (!extra_word || q_s);

  always_comb begin
    buf_push = 1'b0;
    buf_word = data_word;
    if (state == S_HDR) begin
      buf_push         = 1'b1;
      buf_word         = '0;
      buf_word.header  = 1'b1;
      buf_word.fid_err = any_fid_err;
      buf_word.ovf_err = any_ovf_err;
      buf_word.data    = total;
    end else if (need_push && !buf_full) begin
      buf_push = 1'b1;
    end
  end

  assign disp_we  = buf_push && (state == S_RD_EVAL) && !extra_word;
  assign disp_x   = idx;
  assign disp_y   = r_s[TIME_W-1:0];
  assign wc_we    = (state == S_CNT_EVAL) && x_s;
  assign buf_clr  = accept_start;
  assign disp_clr = accept_start;
  assign busy     = (state != S_IDLE);

  // ---- main sequencer ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;  phase <= '0;
      c_r <= '0; n_r <= 5'd1; a_r <= '0; idx <= '0;
      cnt_cur <= '0; i_r <= '0; margin <= '0;
      r_s <= '0; q_s <= 1'b0; x_s <= 1'b0;
      total <= '0; n_wands <= '0; n_skipped <= '0; n_qerr <= '0;
      any_fid_err <= 1'b0; any_ovf_err <= 1'b0; aborted <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (accept_start) begin
          total <= '0; n_wands <= '0; n_skipped <= '0; n_qerr <= '0;
          any_fid_err <= 1'b0; any_ovf_err <= 1'b0; aborted <= 1'b0;
          state <= S_WAIT;
        end
        S_WAIT: if (tmr_tc) begin
          margin <= 8'(END_MARGIN);
          state  <= S_MARGIN;
        end
        S_MARGIN: if (margin == '0) begin
          c_r <= '0; n_r <= 5'd1; a_r <= '0; idx <= '0; phase <= '0;
          state <= S_CNT_CYC;
        end else margin <= margin - 1'b1;

        S_CNT_CYC, S_RD_CYC: begin
          if (phase == 2'd1) begin
            r_s <= r; q_s <= q; x_s <= x;
          end
          if (phase == 2'd2) begin
            phase <= '0;
            state <= (state == S_CNT_CYC) ? S_CNT_EVAL : S_RD_EVAL;
          end else phase <= phase + 1'b1;
        end

        S_CNT_EVAL: begin : cnt_eval
          pos_t p;
          p = advance(c_r, n_r, a_r, !x_s);
          if (x_s) begin
            idx     <= idx + 1'b1;
            n_wands <= n_wands + 1'b1;
            total   <= total + 16'(r_s[ADDR_W-1:0]);
            if (r_s[ADDR_W-1:0] < 2)                       any_fid_err <= 1'b1;
            if (r_s[ADDR_W-1:0] == ADDR_W'(MAX_SPARKS))    any_ovf_err <= 1'b1;
          end else if (a_r == '0) begin
            n_skipped <= n_skipped + 1'b1;
          end
          c_r <= p.c; n_r <= p.n; a_r <= p.a;
          state <= p.wrap ? S_HDR : S_CNT_CYC;
        end

        S_HDR: state <= S_HDR_WAIT;
        S_HDR_WAIT: if (buf_empty) begin
          c_r <= '0; n_r <= 5'd1; a_r <= '0; idx <= '0;
          state <= S_RD_LOAD;
        end

        S_RD_LOAD: begin
          cnt_cur <= wc_rdata;
          i_r     <= '0;
          state   <= S_RD_CYC;
        end

        S_RD_EVAL: begin : rd_eval
          pos_t p;
          if (cpu_mem_ovf) begin
            aborted <= 1'b1;
            state   <= S_DONE;
          end else if (i_r == '0 && a_r == '0 && !x_s) begin
            // empty station
            p = advance(c_r, n_r, a_r, 1'b1);
            n_skipped <= n_skipped + 1'b1;
            c_r <= p.c; n_r <= p.n; a_r <= p.a;
            state <= p.wrap ? S_DONE : S_RD_LOAD;
          end else if (!need_push || !buf_full) begin
            if (!extra_word) begin
              if (!q_s) n_qerr <= n_qerr + 1'b1;
              i_r   <= i_r + 1'b1;
              state <= S_RD_CYC;
            end else begin
              if (q_s) n_qerr <= n_qerr + 1'b1;
              p = advance(c_r, n_r, a_r, 1'b0);
              idx <= idx + 1'b1;
              c_r <= p.c; n_r <= p.n; a_r <= p.a;
              state <= p.wrap ? S_DONE : S_RD_LOAD;
            end
          end
        end

        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // A word is only pushed into a buffer with room.
  a_push_room : assert property (@(posedge clk) disable iff (!rst_n) buf_push |-> !buf_full);

endmodule
