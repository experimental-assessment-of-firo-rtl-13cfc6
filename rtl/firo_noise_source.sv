// FIRO-based noise source: programmable Fibonacci ring plus sampling.
//
// A firo_ring of LENGTH elements runs while `enable` is high. Its nodes are
// sampled by a sample_reg on the `clk` edge with `sample` high:
// sample_out[j] = out_j = f_{r-j}, so out_0 is the last inverter's output
// and out_{r-1} the NAND output. A sampling_methods block derives the
// D-flip-flop, T-flip-flop and state-sampling bits from the same sample.
// This follows the experimental FIRO architecture; the out_j numbering is
// the one printed in its drawing.
//
// Interface: clk, enable (low: ring stopped and samples cleared), sample
// (capture enable), ctr = FIRO_CTR (ctr[i] <-> x^i, i = 1..r-1).
// Timing: outputs valid from the capture edge until `enable` falls.
module firo_noise_source #(
  parameter int unsigned LENGTH       = 16,
  parameter int unsigned INV_DELAY    = 250,
  parameter int unsigned XOR_DELAY    = 230,
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

  logic [LENGTH:1]   f;
  logic              f0;
  logic [LENGTH-1:0] nodes;

  firo_ring #(
    .LENGTH(LENGTH), .INV_DELAY(INV_DELAY), .XOR_DELAY(XOR_DELAY),
    .DELAY_SPREAD(DELAY_SPREAD)
  ) u_ring (
    .enable(enable), .ctr(ctr), .f(f), .f0(f0)
  );

  // out_j <- f_{r-j}
  for (genvar j = 0; j < LENGTH; j++) begin : g_map
    assign nodes[j] = f[LENGTH-j];
  end

  sample_reg #(.WIDTH(LENGTH)) u_smp (
    .clk(clk), .enable(enable), .sample(sample), .d(nodes), .q(sample_out)
  );

  sampling_methods #(.WIDTH(LENGTH)) u_bits (
    .clk(clk), .enable(enable), .sample(sample), .ring_out(nodes[0]),
    .state(sample_out), .d_bit(d_bit), .t_bit(t_bit), .s_bit(s_bit)
  );

endmodule
