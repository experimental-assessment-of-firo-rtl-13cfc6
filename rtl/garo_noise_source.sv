// GARO-based noise source: programmable Galois ring plus sampling.
//
// A garo_ring of LENGTH elements runs while `enable` is high. Its stage
// outputs are sampled by a sample_reg on the `clk` edge with `sample` high:
// sample_out[j] = out_j = f_j, so out_0 is the NAND (feedback) node. A
// sampling_methods block derives the D-flip-flop, T-flip-flop and
// state-sampling bits from the same sample. This follows the experimental
// GARO architecture and the out_j numbering printed in its drawing.
//
// Interface: clk, enable (low: ring stopped and samples cleared), sample
// (capture enable), ctr = GARO_CTR (ctr[i] <-> x^i, i = 1..r-1).
// Timing: outputs valid from the capture edge until `enable` falls.
module garo_noise_source #(
  parameter int unsigned LENGTH       = 15,
  parameter int unsigned ELEM_DELAY   = 270,
  parameter int unsigned DELAY_SPREAD = 23
) (
  input  logic              clk,
  input  logic              enable,
  input  logic              sample,
  input  logic [LENGTH-1:1] ctr,
  output logic [LENGTH-1:0] sample_out,
  output logic              d_bit,
  output logic              t_bit,
  output logic              s_bit
);

  logic [LENGTH-1:0] f;

  garo_ring #(
    .LENGTH(LENGTH), .ELEM_DELAY(ELEM_DELAY), .DELAY_SPREAD(DELAY_SPREAD)
  ) u_ring (
    .enable(enable), .ctr(ctr), .f(f)
  );

  sample_reg #(.WIDTH(LENGTH)) u_smp (
    .clk(clk), .enable(enable), .sample(sample), .d(f), .q(sample_out)
  );

  sampling_methods #(.WIDTH(LENGTH)) u_bits (
    .clk(clk), .enable(enable), .sample(sample), .ring_out(f[0]),
    .state(sample_out), .d_bit(d_bit), .t_bit(t_bit), .s_bit(s_bit)
  );

endmodule
