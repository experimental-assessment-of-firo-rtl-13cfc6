// Fibonacci ring oscillator (FIRO) with a programmable feedback polynomial.
//
// The ring is a cascade of r = LENGTH inverting elements, numbered 1..r from
// left to right. Element 1 is a NAND gate whose second input is `enable`:
// while `enable` is low every node is forced to a known value (f_1 = 1,
// f_2 = 0, ... alternating), so every experiment starts from the same state.
// With `enable` high the NAND acts as an inverter and the ring runs.
//
// The feedback line is a chain of r-1 XOR gates running from right to left.
// It starts at f_r; the XOR at position i adds f_i when ctr[i] is set (a 2:1
// multiplexer selects f_i or constant 0). The chain's end is f_0, the NAND
// input. Hence the feedback polynomial is
//     f(x) = 1 + sum_{i=1}^{r-1} ctr[i] x^i + x^r,
// and the ring has no fixed point iff f(x) = (1+x) h(x) with h(1) = 1.
// Structure, numbering and the NAND stabilisation follow the published FIRO
// architecture; each multiplexer and its XOR form one look-up table, which
// is modelled here as one gate with one delay.
//
// Timing: each element carries a delay (ring elements: INV_DELAY plus a
// fixed per-element offset below DELAY_SPREAD; feedback LUTs: XOR_DELAY plus
// offset) so that the ring oscillates in an event-driven simulator. The
// delay values are this design's assumption; synthesis ignores them.
//
// The combinational loop is intended: it is the oscillator. On an FPGA the
// nets must be kept (keep attribute) and the elements placed by hand, as
// the original set-up did; that placement is not expressible in RTL.
//
// Interface: enable (active high, async), ctr[LENGTH-1:1] = FIRO_CTR with
// ctr[i] the coefficient of x^i, f[LENGTH:1] the ring nodes, f0 the
// feedback signal.
module firo_ring #(
  parameter int unsigned LENGTH       = 16,
  parameter int unsigned INV_DELAY    = 250,  // ps
  parameter int unsigned XOR_DELAY    = 230,  // ps
  parameter int unsigned DELAY_SPREAD = 23    // ps
) (
  input  logic              enable,
  input  logic [LENGTH-1:1] ctr,
  output logic [LENGTH:1]   f,
  output logic              f0
);

  // fb[i]: output of the feedback LUT at position i (i = r-1 .. 1).
  logic [LENGTH:1] fb;

  // NAND stage (element 1).
  localparam int unsigned D_NAND = ro_pkg::element_delay(INV_DELAY, DELAY_SPREAD, 1);
  assign #(D_NAND * 1ps) f[1] = ~(f0 & enable);

  // Inverter stages 2..r.
  for (genvar i = 2; i <= LENGTH; i++) begin : g_inv
    localparam int unsigned D = ro_pkg::element_delay(INV_DELAY, DELAY_SPREAD, i);
    assign #(D * 1ps) f[i] = ~f[i-1];
  end

  // Feedback chain, right to left. fb[LENGTH] is the plain wire from f_r.
  assign fb[LENGTH] = f[LENGTH];
  for (genvar i = LENGTH - 1; i >= 1; i--) begin : g_fb
    localparam int unsigned D = ro_pkg::element_delay(XOR_DELAY, DELAY_SPREAD, i + LENGTH);
    assign #(D * 1ps) fb[i] = fb[i+1] ^ (ctr[i] ? f[i] : 1'b0);
  end

  assign f0 = fb[1];

endmodule
