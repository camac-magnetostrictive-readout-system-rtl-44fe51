// display_controller: feeds the x-y scope D/A converters with the event just
// read out, so that the scope shows it automatically at the end of readout.
//
// During readout every data word also goes into a point memory as (wand index,
// time). When the processor reports the end of readout the controller replays
// the points over and over: each point is held on the x and y codes, with the
// beam unblanked, for DWELL clocks, so the scope shows a map of spark time
// against wand. The next event's start clears the memory and stops the replay.
// The document says only that the processor has a D/A converter for the scope
// and that the event is displayed automatically after readout; the point
// memory, the replay and the code scaling (x = wand index, y = upper DAC_W bits
// of the time) are own choices. The D/A converters themselves are analog and
// outside this module.
// Timing: a point written at edge t is in the memory from t on; the replay
// starts one clock after done.
module display_controller
  import anna_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,  // >= 164 wands x 15 sparks = 2460
  parameter int unsigned DAC_W = 8,
  parameter int unsigned DWELL = 4,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic                  we,
  input  logic [WAND_IDX_W-1:0] px,
  input  logic [TIME_W-1:0]     py,
  input  logic                  done,
  output logic [DAC_W-1:0]      dac_x,
  output logic [DAC_W-1:0]      dac_y,
  output logic                  unblank,
  output logic [AW:0]           n_points
);

  logic [WAND_IDX_W+TIME_W-1:0] mem [DEPTH];
  logic [AW-1:0]  rp;
  logic [7:0]     dwell;
  logic           running;
  logic [WAND_IDX_W+TIME_W-1:0] pt;

  always_ff @(posedge clk) begin
    if (we && n_points < (AW+1)'(DEPTH)) mem[n_points[AW-1:0]] <= {px, py};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_points <= '0; running <= 1'b0; rp <= '0; dwell <= '0;
    end else if (clr) begin
      n_points <= '0; running <= 1'b0; rp <= '0; dwell <= '0;
    end else begin
      if (we && n_points < (AW+1)'(DEPTH)) n_points <= n_points + 1'b1;
      if (done) begin
        running <= (n_points != '0);
        rp      <= '0;
        dwell   <= '0;
      end else if (running) begin
        if (dwell == 8'(DWELL - 1)) begin
          dwell <= '0;
          rp    <= ((AW+1)'(rp) + 1'b1 >= n_points) ? '0 : rp + 1'b1;
        end else dwell <= dwell + 1'b1;
      end
    end
  end

  assign pt      = mem[rp];
  assign unblank = running;
  assign dac_x   = running ? DAC_W'(pt[TIME_W +: WAND_IDX_W]) : '0;
  assign dac_y   = running ? pt[TIME_W-1 -: DAC_W] : '0;

endmodule
