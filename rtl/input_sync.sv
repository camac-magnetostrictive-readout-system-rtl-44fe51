// input_sync: brings an asynchronous input (start, a wand's data pulse, test)
// into the 20 MHz clock domain and marks its leading edge.
//
// Two flip-flops resynchronize the input; a third holds the previous sample, and
// pulse is high for exactly one clock when the synchronized level goes from low
// to high. So an input pulse, however long, gives one event, and a new event
// needs the input to be low for at least one clock sample in between.
// The document says only that the clock synchronizes the start, data and test
// inputs; the two-stage synchronizer and leading-edge detection are own choices.
//
// Timing: if the input is first sampled high at clock edge k, level and pulse
// go high after edge k+1, and pulse falls again after edge k+2.
module input_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic d,       // asynchronous input
  output logic level,   // synchronized level
  output logic pulse    // one-clock leading-edge pulse
);

  logic s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
      s3 <= 1'b0;
    end else begin
      s1 <= d;
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign level = s2;
  assign pulse = s2 & ~s3;

endmodule
