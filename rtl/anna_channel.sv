// anna_channel: one wand channel of the time digitizer.
//
// While the module's clock gate is open, every spark pulse on the channel's
// input writes the present value of the module's synchronous counter into the
// channel's 16x16 memory at the address held by a 4-bit address counter, and
// the address counter then steps by one. After 15 words the channel is full and
// its input is gated off, which leaves the 16th location for the all-zero "last
// word" written into every channel when the synchronous counter overflows. The
// address counter therefore doubles as the channel's word counter (0..15).
// All of this follows the document. Own choices: the address counter is a
// synchronous counter rather than a ripple counter; the last word takes
// precedence over a spark arriving in the same clock (the digitizer writes it
// after the gate has closed, so the two never meet); readout uses a separate
// 4-bit read pointer, cleared by the start and stepped after each data read, so
// the word counter stays readable during readout.
//
// Interface: arm (one clock, from the start pulse) clears the address counter
// and the read pointer; gate is the module's clock gate; hit is the channel's
// synchronized one-clock spark pulse; last_we writes the last word; tcount is
// the synchronous counter. rdata is the word at the read pointer, rd_step
// advances the pointer. Timing: a hit in cycle t stores tcount of cycle t at the
// edge ending t; word_count counts it from cycle t+1.
module anna_channel
  import anna_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               arm,
  input  logic               gate,
  input  logic               hit,
  input  logic               last_we,
  input  logic [TIME_W-1:0]  tcount,
  input  logic               rd_step,
  output logic [TIME_W-1:0]  rdata,
  output logic [ADDR_W-1:0]  word_count,
  output logic               full
);

  logic [ADDR_W-1:0] waddr, rptr;
  logic              accept, we;
  logic [TIME_W-1:0] wdata;

  assign full   = (waddr == ADDR_W'(MAX_SPARKS));
  assign accept = gate && hit && !full && !last_we;
  assign we     = accept || last_we;
  assign wdata  = last_we ? '0 : tcount;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr <= '0;
      rptr  <= '0;
    end else if (arm) begin
      waddr <= '0;
      rptr  <= '0;
    end else begin
      if (accept)  waddr <= waddr + 1'b1;
      if (rd_step) rptr  <= rptr + 1'b1;
    end
  end

  spark_memory #(.DEPTH(MEM_DEPTH), .WIDTH(TIME_W)) u_mem (
    .clk   (clk),
    .we    (we),
    .waddr (waddr),
    .wdata (wdata),
    .raddr (rptr),
    .rdata (rdata)
  );

  assign word_count = waddr;

  // The address counter never passes the full mark.
  a_no_wrap : assert property (@(posedge clk) disable iff (!rst_n)
                               full |=> (waddr == ADDR_W'(MAX_SPARKS)) || $past(arm));

endmodule
