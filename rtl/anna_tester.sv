// anna_tester: the system tester, which simulates an event through the start
// and the bridged TEST input of the ANNA modules.
//
// A go pulse starts one test event: the tester raises START for one clock and
// then, timed by its own counter, raises TEST for one clock per simulated spark
// at chosen values of the modules' time count. Since the start and the test
// input pass through identical input synchronizers in the modules, a TEST pulse
// raised P+1 clocks after START is recorded as time P.
// Two modes, as the document describes them:
//   MODE_MULTI  up to 15 sparks, the first at the programmed count first_t and
//               the others at a fixed separation of 8 clocks (400 ns at 20 MHz).
//   MODE_MEMORY the arbitrary 16-bit pattern is written into location loc of
//               every channel: loc sparks at counts pattern-2*loc, ...,
//               pattern-2 fill the lower locations, one at count pattern lands
//               in location loc. Pattern must be at least 2*loc and must be below
//               the last count (own method; the document gives only the mode).
// The one-clock pulses, the two-clock spacing in memory mode, the control ports
// and the timing reference are own choices; cfg_err flags an impossible request
// and no event is generated.
// Timing: start_out is high in the clock after go; busy stays high until the
// last test pulse has been sent.
module anna_tester
  import anna_pkg::*;
#(
  parameter int unsigned COUNT_STAGES = 4    // time counter of the modules, 4-bit stages
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               go,
  input  logic               mode,         // 0 = multiple spark, 1 = memory writing
  input  logic [TIME_W-1:0]  first_t,
  input  logic [ADDR_W-1:0]  n_sparks,     // 1..15
  input  logic [ADDR_W-1:0]  loc,
  input  logic [TIME_W-1:0]  pattern,
  output logic               start_out,
  output logic               test_out,
  output logic               busy,
  output logic               cfg_err
);

  localparam int unsigned CW = COUNT_STAGES * 4;
  localparam logic MODE_MULTI = 1'b0;

  logic [CW:0]        tcnt;          // tester clock count since START
  logic [CW:0]        next_t;        // module count at which the next pulse lands
  logic [ADDR_W:0]    left;          // pulses still to send
  logic [4:0]         step;          // spacing between pulses
  logic               bad;

  always_comb begin
    if (mode == MODE_MULTI)
      bad = (n_sparks == '0) ||
            ((CW+1)'(first_t) + (CW+1)'(8 * (int'(n_sparks) - 1)) >= (CW+1)'(2**CW - 1)) ||
            (TIME_W'(first_t) >> CW) != '0;
    else
      bad = ((CW+1)'(pattern) < (CW+1)'(2 * loc)) || (loc > ADDR_W'(MAX_SPARKS - 1)) ||
            ((CW+1)'(pattern) >= (CW+1)'(2**CW - 1)) || (TIME_W'(pattern) >> CW) != '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; start_out <= 1'b0; test_out <= 1'b0; cfg_err <= 1'b0;
      tcnt <= '0; next_t <= '0; left <= '0; step <= '0;
    end else begin
      start_out <= 1'b0;
      test_out  <= 1'b0;
      if (!busy) begin
        if (go) begin
          cfg_err <= bad;
          if (!bad) begin
            busy      <= 1'b1;
            start_out <= 1'b1;
            tcnt      <= '0;
            if (mode == MODE_MULTI) begin
              next_t <= (CW+1)'(first_t);
              left   <= (ADDR_W+1)'(n_sparks);
              step   <= 5'd8;
            end else begin
              next_t <= (CW+1)'(pattern) - (CW+1)'(2 * loc);
              left   <= (ADDR_W+1)'(loc) + 1'b1;
              step   <= 5'd2;
            end
          end
        end
      end else begin
        tcnt <= tcnt + 1'b1;
        // tcnt is 0 in the clock START is high; a pulse raised when tcnt equals
        // P+1 is recorded as P, so raise it in the clock after tcnt == P.
        if (tcnt == next_t) begin
          test_out <= 1'b1;
          next_t   <= next_t + (CW+1)'(step);
          left     <= left - 1'b1;
          if (left == 1) busy <= 1'b0;
        end
      end
    end
  end

endmodule
