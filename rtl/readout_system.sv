// readout_system: the complete magnetostrictive spark-chamber readout.
//
// N_MODULES four-channel time digitizers (ANNA) sit in NCRATES CAMAC crates,
// MODS_PER_CRATE per crate from station 1 up; the remaining stations are empty.
// All share the clock, the bridged start (the chamber trigger ORed with the
// tester's start) and the bridged TEST input from the system tester. Each
// module times the sparks of its four wands by itself, with its own counter, so
// no fast data passes between modules. After the event the readout processor
// reads every crate through its dataway, sends the spark total and then the
// data words through the word buffer to the computer, and the display
// controller shows the event on the x-y scope.
// The numbers (41 modules, 164 wands, 2 crates, 16-bit counter) follow the
// document. The direct connection of the processor to the crate dataways, in
// place of the branch highway and crate controllers, is an own simplification.
//
// Interface: wand_in[4*m+c] is the zero-crossing detector output of channel c
// of module m; the computer side is a valid/ready stream of cpu_word_t plus a
// memory-overflow flag; dac_x/dac_y/unblank drive the scope's converters.
module readout_system
  import anna_pkg::*;
#(
  parameter int unsigned NCRATES        = 2,
  parameter int unsigned SLOTS          = 23,
  parameter int unsigned MODS_PER_CRATE = 21,
  parameter int unsigned N_MODULES      = 41,
  parameter int unsigned COUNT_STAGES   = 4,
  parameter int unsigned BUF_DEPTH      = 16,
  parameter int unsigned DISP_DEPTH     = 4096,
  parameter int unsigned DAC_W          = 8,
  parameter int unsigned BUF_AW         = $clog2(BUF_DEPTH),
  parameter int unsigned DISP_AW        = $clog2(DISP_DEPTH)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          trigger_in,
  input  logic [CHANNELS*N_MODULES-1:0] wand_in,
  input  logic                          camac_z,
  // system tester control
  input  logic                          t_go,
  input  logic                          t_mode,
  input  logic [TIME_W-1:0]             t_first,
  input  logic [ADDR_W-1:0]             t_nsparks,
  input  logic [ADDR_W-1:0]             t_loc,
  input  logic [TIME_W-1:0]             t_pattern,
  output logic                          t_busy,
  output logic                          t_cfg_err,
  // computer
  output cpu_word_t                     cpu_word,
  output logic                          cpu_valid,
  input  logic                          cpu_ready,
  input  logic                          cpu_mem_ovf,
  // scope
  output logic [DAC_W-1:0]              dac_x,
  output logic [DAC_W-1:0]              dac_y,
  output logic                          unblank,
  // status
  output logic                          proc_busy,
  output logic                          proc_done,
  output logic                          proc_aborted,
  output logic [15:0]                   spark_total,
  output logic [7:0]                    q_errors,
  output logic                          fid_error,
  output logic                          ovf_error,
  output logic [N_MODULES-1:0]          module_busy
);

  // ---- tester and bridged inputs ----
  logic t_start, t_test, start_bridge;

  anna_tester #(.COUNT_STAGES(COUNT_STAGES)) u_tester (
    .clk(clk), .rst_n(rst_n), .go(t_go), .mode(t_mode), .first_t(t_first),
    .n_sparks(t_nsparks), .loc(t_loc), .pattern(t_pattern),
    .start_out(t_start), .test_out(t_test), .busy(t_busy), .cfg_err(t_cfg_err)
  );

  assign start_bridge = trigger_in | t_start;

  // ---- processor ----
  camac_cmd_t            cmd;
  logic [CAMAC_R_W-1:0]  bus_r;
  logic                  bus_q, bus_x;
  logic                  buf_clr, buf_push, buf_full, buf_valid;
  cpu_word_t             buf_word;
  logic [BUF_AW:0]       buf_level;
  logic                  disp_clr, disp_we;
  logic [WAND_IDX_W-1:0] disp_x;
  logic [TIME_W-1:0]     disp_y;

  readout_processor #(
    .NCRATES(NCRATES), .SLOTS(SLOTS), .COUNT_STAGES(COUNT_STAGES)
  ) u_proc (
    .clk(clk), .rst_n(rst_n), .start_in(start_bridge),
    .cmd(cmd), .r(bus_r), .q(bus_q), .x(bus_x),
    .buf_clr(buf_clr), .buf_push(buf_push), .buf_word(buf_word),
    .buf_full(buf_full), .buf_empty(!buf_valid), .cpu_mem_ovf(cpu_mem_ovf),
    .disp_clr(disp_clr), .disp_we(disp_we), .disp_x(disp_x), .disp_y(disp_y),
    .busy(proc_busy), .done(proc_done), .aborted(proc_aborted), .total(spark_total),
    .n_wands(), .n_skipped(), .n_qerr(q_errors),
    .any_fid_err(fid_error), .any_ovf_err(ovf_error)
  );

  // ---- word buffer to the computer ----
  logic [31:0] cpu_bits;
  word_buffer #(.WIDTH(32), .DEPTH(BUF_DEPTH)) u_buf (
    .clk(clk), .rst_n(rst_n), .clr(buf_clr), .push(buf_push), .din(buf_word),
    .full(buf_full), .valid(buf_valid), .ready(cpu_ready), .dout(cpu_bits), .level(buf_level)
  );
  assign cpu_word  = cpu_bits;
  assign cpu_valid = buf_valid;

  // ---- scope display ----
  display_controller #(.DEPTH(DISP_DEPTH), .DAC_W(DAC_W)) u_disp (
    .clk(clk), .rst_n(rst_n), .clr(disp_clr), .we(disp_we), .px(disp_x), .py(disp_y),
    .done(proc_done), .dac_x(dac_x), .dac_y(dac_y), .unblank(unblank), .n_points()
  );

  // ---- crates ----
  logic [CAMAC_R_W-1:0] crate_r [NCRATES];
  logic [NCRATES-1:0]   crate_q, crate_x;

  for (genvar c = 0; c < NCRATES; c++) begin : g_crate
    logic [SLOTS-1:0]     n_line;
    logic [CAMAC_R_W-1:0] r_st [SLOTS];
    logic [SLOTS-1:0]     q_st, x_st;

    camac_dataway #(.SLOTS(SLOTS)) u_dw (
      .sel(cmd.crate == 3'(c)), .n_num(cmd.n), .n_line(n_line),
      .r_st(r_st), .q_st(q_st), .x_st(x_st),
      .r(crate_r[c]), .q(crate_q[c]), .x(crate_x[c])
    );

    for (genvar s = 0; s < SLOTS; s++) begin : g_st
      localparam int unsigned M = c * MODS_PER_CRATE + s;
      if (s < MODS_PER_CRATE && M < N_MODULES) begin : g_anna
        anna_digitizer #(.COUNT_STAGES(COUNT_STAGES)) u_anna (
          .clk(clk), .rst_n(rst_n),
          .start_in(start_bridge), .test_in(t_test),
          .data_in(wand_in[CHANNELS*M +: CHANNELS]),
          .n(n_line[s]), .a(cmd.a), .f(cmd.f), .s1(cmd.s1), .s2(cmd.s2), .z(camac_z),
          .r(r_st[s]), .q(q_st[s]), .x(x_st[s]), .busy(module_busy[M])
        );
      end else begin : g_empty
        assign r_st[s] = '0;
        assign q_st[s] = 1'b0;
        assign x_st[s] = 1'b0;
      end
    end
  end

  always_comb begin
    bus_r = '0;
    for (int c = 0; c < NCRATES; c++) bus_r = bus_r | crate_r[c];
  end
  assign bus_q = |crate_q;
  assign bus_x = |crate_x;

  initial begin
    if (N_MODULES > NCRATES * MODS_PER_CRATE) $error("more modules than crate stations");
    if (NCRATES > MAX_CRATES) $error("the crate controller allows at most 7 crates");
  end

endmodule
