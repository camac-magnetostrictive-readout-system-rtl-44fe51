// spark_memory: the fast memory of one wand, 16 words of 16 bits.
//
// The document uses Intel 3101 bipolar RAMs (16 words x 4 bits, four side by side
// for a 16-bit word), written synchronously at full clock rate with no buffer in
// front. Here it is a register array: a write with we at a clock edge stores
// wdata at waddr; the read port is asynchronous (rdata follows raddr), as in the
// 3101, which is a static RAM with non-clocked read. The contents are not
// cleared by reset, as in a RAM; the channel writes every location it later
// allows to be read.
module spark_memory #(
  parameter int unsigned DEPTH  = 16,   // document: 16 words
  parameter int unsigned WIDTH  = 16,   // document: 16 bits
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
