// anna_digitizer: the 4-channel CAMAC time digitizer module ("ANNA").
//
// A free-running clock (20 MHz in the document) is the time base. A start pulse
// opens the clock gate: the 16-bit synchronous counter starts from zero and the
// four wand inputs are enabled. Each spark on a wand writes the counter value
// into that wand's 16x16 memory (see anna_channel). When the counter overflows
// (65536 clocks, 3.3 ms at 20 MHz) the gate closes, an all-zero last word is
// written into every channel in the next clock and the inputs stay inhibited until the next start.
// The bridged TEST input is ORed into all four inputs before synchronization,
// so a tester can simulate sparks. There is no buffer between counter and
// memories: a spark is recorded in the clock it is seen.
//
// Readout uses the CAMAC dataway (own function-code choice, see anna_pkg):
//   F(0)·A(c)  R = data word at channel c's read pointer, Q = word is non-zero
//              (so Q drops on the all-zero last word); S2 steps the pointer.
//   F(1)·A(c)  R = word counter of channel c (sparks recorded, 0..15), Q = 1.
//   X          = 1 for any of these commands addressed to the module, so the
//              processor can tell an occupied station from an empty one.
//   Z          initializes the module (gate closed, counters cleared).
// Start-while-busy is ignored (own choice); the document only says the gate stays
// closed until the next start.
// Timing: the strobes and R/Q/X are treated as signals of the module's clock
// (own simplification); R, Q and X are combinational from N, A, F and state.
module anna_digitizer
  import anna_pkg::*;
#(
  parameter int unsigned COUNT_STAGES = 4   // 4-bit stages of the time counter: 16 bits
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // front panel
  input  logic                  start_in,
  input  logic                  test_in,
  input  logic [CHANNELS-1:0]   data_in,
  // CAMAC dataway
  input  logic                  n,
  input  logic [3:0]            a,
  input  logic [4:0]            f,
  input  logic                  s1,
  input  logic                  s2,
  input  logic                  z,
  output logic [CAMAC_R_W-1:0]  r,
  output logic                  q,
  output logic                  x,
  // status
  output logic                  busy
);

  localparam int unsigned CW = COUNT_STAGES * 4;

  logic              start_p;
  logic [CHANNELS-1:0] hit;
  logic              gate, arm, last_we;
  logic [CW-1:0]     cnt;
  logic              cnt_tc;
  logic [TIME_W-1:0] tcount;

  input_sync u_sync_start (.clk(clk), .rst_n(rst_n), .d(start_in), .level(), .pulse(start_p));

  for (genvar c = 0; c < CHANNELS; c++) begin : g_in
    input_sync u_sync (.clk(clk), .rst_n(rst_n), .d(data_in[c] | test_in), .level(), .pulse(hit[c]));
  end

  // Clock gate: opened by start, closed at counter overflow or by Z.
  assign arm = (start_p && !gate) || z;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        gate <= 1'b0;
    else if (z)        gate <= 1'b0;
    else if (arm)      gate <= 1'b1;
    else if (cnt_tc)   gate <= 1'b0;
  end

  sync_counter #(.STAGES(COUNT_STAGES), .STAGE_W(4)) u_counter (
    .clk(clk), .rst_n(rst_n), .clr(arm), .en(gate), .q(cnt), .tc(cnt_tc)
  );

  assign tcount  = TIME_W'(cnt);

  // The last word goes in one clock after the overflow, when the gate is
  // already closed: a spark seen at the final count is still recorded first.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_we <= 1'b0;
    else        last_we <= cnt_tc && !z;
  end

  // Channels
  logic [TIME_W-1:0] rdata [CHANNELS];
  logic [ADDR_W-1:0] wcount[CHANNELS];
  logic [CHANNELS-1:0] rd_step;
  logic              addr_ok, f_data, f_count;
  logic [1:0]        ch;

  assign ch      = a[1:0];
  assign addr_ok = (a < 4'(CHANNELS));
  assign f_data  = n && addr_ok && (f == F_READ_DATA);
  assign f_count = n && addr_ok && (f == F_READ_COUNT);

  for (genvar c = 0; c < CHANNELS; c++) begin : g_ch
    assign rd_step[c] = f_data && s2 && (ch == c);
    anna_channel u_ch (
      .clk(clk), .rst_n(rst_n), .arm(arm), .gate(gate), .hit(hit[c]),
      .last_we(last_we), .tcount(tcount), .rd_step(rd_step[c]),
      .rdata(rdata[c]), .word_count(wcount[c]), .full()
    );
  end

  always_comb begin
    r = '0;
    q = 1'b0;
    if (f_data) begin
      r = CAMAC_R_W'(rdata[ch]);
      q = (rdata[ch] != '0);
    end else if (f_count) begin
      r = CAMAC_R_W'(wcount[ch]);
      q = 1'b1;
    end
  end

  assign x    = f_data || f_count;
  assign busy = gate;

  // S1 is part of the dataway cycle but the module acts only on S2.
  logic unused_s1;
  assign unused_s1 = s1;

endmodule
