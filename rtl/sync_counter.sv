// sync_counter: the module's time base, a synchronous binary counter built of
// 4-bit stages in which the carry from the first stage to the others is
// anticipated by one clock.
//
// In a plain cascade the first stage's carry-out (its count is all ones) is a
// slow combinational path that must enable the upper stages within one clock.
// Here a flip-flop (the document's 74S112 JK, fed by a 74S11 AND gate) is set on
// the clock edge at which the first stage goes to all ones, i.e. it is loaded
// with "first stage is one count short of all ones and counting". Its output is
// then high exactly while the first stage holds all ones, straight from a
// flip-flop, and enables the upper stages. The upper stages cascade as usual:
// stage k counts when the anticipated carry is high and stages 1..k-1 are all
// ones. This follows the document; the stage count and widths are parameters.
//
// Interface: clr (synchronous, wins over en) loads zero; en counts up by one per
// clock; q is the count; tc is high in the cycle in which the counter is at all
// ones and enabled, so the next edge wraps it to zero (overflow).
// Timing: q changes one clock after en; tc is combinational from q, en and the
// carry flip-flop.
module sync_counter #(
  parameter int unsigned STAGES  = 4,   // 4 x 4 bits = 16 bits (document)
  parameter int unsigned STAGE_W = 4    // width of one 8284-style stage
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       en,
  output logic [STAGES*STAGE_W-1:0]  q,
  output logic                       tc
);

  localparam int unsigned W = STAGES * STAGE_W;
  localparam logic [STAGE_W-1:0] ONES  = '1;
  localparam logic [STAGE_W-1:0] ONES1 = ONES - 1'b1;

  logic [STAGE_W-1:0] stage [STAGES];
  logic               carry_ff;             // anticipated carry of stage 0
  logic [STAGES-1:0]  stage_en;

  // Enable chain: stage 0 counts with en, stage 1 with the anticipated carry,
  // higher stages also need all lower upper-stages at all ones.
  always_comb begin
    stage_en[0] = en;
    for (int k = 1; k < STAGES; k++) begin
      if (k == 1) stage_en[k] = en && carry_ff;
      else        stage_en[k] = stage_en[k-1] && (stage[k-1] == ONES);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry_ff <= 1'b0;
      for (int k = 0; k < STAGES; k++) stage[k] <= '0;
    end else if (clr) begin
      carry_ff <= 1'b0;
      for (int k = 0; k < STAGES; k++) stage[k] <= '0;
    end else begin
      // JK behaviour: set when stage 0 is about to reach all ones, reset when it
      // is about to leave it; hold while not counting.
      if (en) carry_ff <= (stage[0] == ONES1);
      for (int k = 0; k < STAGES; k++)
        if (stage_en[k]) stage[k] <= stage[k] + 1'b1;
    end
  end

  always_comb begin
    for (int k = 0; k < STAGES; k++) q[k*STAGE_W +: STAGE_W] = stage[k];
  end

  assign tc = stage_en[STAGES-1] && (stage[STAGES-1] == ONES);

  // The anticipated carry must always equal the combinational carry it replaces.
  a_carry_matches : assert property (@(posedge clk) disable iff (!rst_n)
                                     carry_ff == (stage[0] == ONES));

  initial begin
    if (W < 2 || STAGES < 2) $error("sync_counter needs at least two stages");
  end

endmodule
