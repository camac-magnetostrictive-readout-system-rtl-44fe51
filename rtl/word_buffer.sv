// word_buffer: the buffer memory of 32-bit computer words between the
// processor and the computer's I/O.
//
// A first-in first-out buffer: the processor pushes words, the computer takes
// them with a valid/ready handshake (a word moves when valid and ready are both
// high at a clock edge). The document names a 32-bit buffer memory but gives no
// depth or handshake; a 16-word FIFO is an own choice. push while full is
// refused (the writer must look at full); clr empties the buffer.
// Timing: a word pushed at edge t is at the output (valid) from t on; level is
// the number of words held.
module word_buffer #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16,     // assumed
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  output logic             valid,
  input  logic             ready,
  output logic [WIDTH-1:0] dout,
  output logic [AW:0]      level
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign full    = (level == (AW+1)'(DEPTH));
  assign valid   = (level != '0);
  assign do_push = push && !full;
  assign do_pop  = valid && ready;
  assign dout    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0;
    end else if (clr) begin
      wp <= '0; rp <= '0; level <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      level <= level + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));

endmodule
