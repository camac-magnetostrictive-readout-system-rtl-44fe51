// wordcount_memory: the processor's 16 x 64 bit memory that keeps the word
// counter of every wand between the spark computation and the readout.
//
// The document gives only its size. Here a 64-bit row holds sixteen 4-bit word
// counters, so the memory holds 256 counters (the document's system has 164
// wands). A counter is addressed by an 8-bit wand index: the upper four bits
// select the row, the lower four the field in the row. Writing replaces one field
// and keeps the other fields of the row (a field write enable, own choice).
// Timing: write at the clock edge; the read port is asynchronous.
module wordcount_memory #(
  parameter int unsigned ROWS    = 16,  // document: 16
  parameter int unsigned ROW_W   = 64,  // document: 64 bits
  parameter int unsigned FIELD_W = 4,   // width of one word counter
  parameter int unsigned FIELDS  = ROW_W / FIELD_W,
  parameter int unsigned IDX_W   = $clog2(ROWS * FIELDS)
) (
  input  logic               clk,
  input  logic               we,
  input  logic [IDX_W-1:0]   widx,
  input  logic [FIELD_W-1:0] wdata,
  input  logic [IDX_W-1:0]   ridx,
  output logic [FIELD_W-1:0] rdata
);

  localparam int unsigned FW = $clog2(FIELDS);
  localparam int unsigned RW = IDX_W - FW;

  logic [ROW_W-1:0] mem [ROWS];
  logic [RW-1:0]    wrow, rrow;
  logic [FW-1:0]    wfld, rfld;

  assign wrow = widx[IDX_W-1:FW];
  assign wfld = widx[FW-1:0];
  assign rrow = ridx[IDX_W-1:FW];
  assign rfld = ridx[FW-1:0];

  always_ff @(posedge clk) begin
    if (we) mem[wrow][wfld*FIELD_W +: FIELD_W] <= wdata;
  end

  assign rdata = mem[rrow][rfld*FIELD_W +: FIELD_W];

endmodule
