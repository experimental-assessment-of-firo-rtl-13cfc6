// The three ways of turning a sampled ring into one output bit.
//
//  * D-flip-flop sampling: the sampled value of out_0, the ring node that
//    the classic single-output sampler would see. The sample flip-flop
//    already holds it, so d_bit is wired straight from state[0].
//  * T-flip-flop sampling: a toggle flip-flop clocked by the oscillating
//    node itself counts its 0-1 transitions modulo 2; its value is captured
//    together with the state sample.
//  * State sampling: the XOR of all sampled state bits, i.e. the parity of
//    the whole internal ring state at the sampling edge.
// The three methods are the ones compared in the assessment; which node
// drives the T-flip-flop (the same node as out_0) is this design's choice.
//
// Timing: the toggle flip-flop is cleared while `enable` is low and counts
// from the moment the ring starts. t_bit is captured on the `clk` edge
// with `sample` high, in the same edge as the state array; all three bits
// are valid while `enable` stays high after that edge.
module sampling_methods #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             enable,
  input  logic             sample,
  input  logic             ring_out,   // oscillating node (asynchronous)
  input  logic [WIDTH-1:0] state,      // sampled ring state, out_0 at bit 0
  output logic             d_bit,
  output logic             t_bit,
  output logic             s_bit
);

  logic toggle;

  // Toggle flip-flop clocked by the ring node.
  always_ff @(posedge ring_out or negedge enable) begin
    if (!enable) toggle <= 1'b0;
    else         toggle <= ~toggle;
  end

  // Capture of the toggle flip-flop in the sampling edge.
  always_ff @(posedge clk or negedge enable) begin
    if (!enable)     t_bit <= 1'b0;
    else if (sample) t_bit <= toggle;
  end

  assign d_bit = state[0];
  assign s_bit = ^state;

endmodule
