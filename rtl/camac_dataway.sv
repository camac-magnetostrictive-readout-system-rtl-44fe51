// camac_dataway: the dataway of one CAMAC crate as the processor sees it.
//
// The station number put on the crate by the processor is decoded into one N
// line per station; the read lines R, Q and X of all stations are combined as
// on the real wired-OR bus (only the addressed station drives them). An
// unoccupied station drives nothing, so a command to it returns X = 0, which is
// how the processor finds the empty locations. The document uses standard
// CAMAC crates; this reduced model (no crate controller, no L or I lines) is an
// own simplification.
// Interface: sel selects the crate; n_num is the station number 1..SLOTS.
// Timing: purely combinational.
module camac_dataway
  import anna_pkg::*;
#(
  parameter int unsigned SLOTS = 23     // normal stations of a CAMAC crate
) (
  input  logic                  sel,
  input  logic [4:0]            n_num,
  output logic [SLOTS-1:0]      n_line,       // bit k = station k+1
  input  logic [CAMAC_R_W-1:0]  r_st [SLOTS],
  input  logic [SLOTS-1:0]      q_st,
  input  logic [SLOTS-1:0]      x_st,
  output logic [CAMAC_R_W-1:0]  r,
  output logic                  q,
  output logic                  x
);

  always_comb begin
    n_line = '0;
    for (int k = 0; k < SLOTS; k++)
      n_line[k] = sel && (n_num == 5'(k + 1));
  end

  always_comb begin
    r = '0;
    q = 1'b0;
    x = 1'b0;
    for (int k = 0; k < SLOTS; k++) begin
      if (n_line[k]) begin
        r = r | r_st[k];
        q = q | q_st[k];
        x = x | x_st[k];
      end
    end
  end

endmodule
