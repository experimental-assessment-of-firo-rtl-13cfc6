// Sample flip-flop array of a ring-oscillator noise source.
//
// One D-type flip-flop per ring node. On a rising `clk` edge with `sample`
// high (the flip-flops' enable input) the asynchronous ring state `d` is
// captured. While `enable` is low (the ring is held in its stabilised state)
// the array is cleared asynchronously, so a stale sample cannot survive
// into the next experiment. In the original set-up these flip-flops sit in
// the same logic module as the ring element they sample.
//
// Timing: q is valid from the clock edge that had `sample` high until
// `enable` falls. `d` is asynchronous to `clk`; in hardware the first
// stage may go metastable, which is part of what is being measured.
// The use of `enable` as the active-low clear is this design's reading of
// the clear pins in the architecture drawings.
module sample_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             enable,
  input  logic             sample,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge enable) begin
    if (!enable)     q <= '0;
    else if (sample) q <= d;
  end

endmodule
