// Galois ring oscillator (GARO) with a programmable feedback polynomial.
//
// The ring has r = LENGTH inverting elements, numbered r-1..0 from left to
// right. The feedback line is node f_0, the output of the last element, a
// NAND gate whose second input is `enable`. Stage i (i = r-1 .. 1) inverts
// its input (f_0 for stage r-1, the output of stage i+1 otherwise) and, when
// ctr[i] is set, XORs the feedback f_0 into the result:
//     f_i = ~in_i ^ (ctr[i] & f_0).
// The NAND closes the ring: f_0 = ~(f_1 & enable). The feedback polynomial
// is f(x) = 1 + sum_{i=1}^{r-1} ctr[i] x^i + x^r; the ring has no fixed
// point iff r is odd and f(1) = 0.
//
// Each stage (inverter, multiplexer and XOR) is one look-up table and is
// modelled as one gate with one delay. A consequence the hardware shows too:
// with ctr[r-1] set, stage r-1 computes ~f_0 ^ f_0 = 1, a constant, and the
// feedback never reaches the rest of the ring through that stage.
// `enable` low forces f_0 = 1 and hence a known state of every node.
//
// Timing: element delays (ELEM_DELAY plus a fixed per-element offset below
// DELAY_SPREAD) exist only so that the ring oscillates in an event-driven
// simulator; they are this design's assumption and synthesis ignores them.
// The combinational loop is intended: it is the oscillator (keep attribute
// and hand placement are needed on an FPGA).
//
// Interface: enable (active high, async), ctr[LENGTH-1:1] = GARO_CTR with
// ctr[i] the coefficient of x^i, f[LENGTH-1:0] the stage outputs.
module garo_ring #(
  parameter int unsigned LENGTH       = 15,
  parameter int unsigned ELEM_DELAY   = 270,  // ps
  parameter int unsigned DELAY_SPREAD = 23    // ps
) (
  input  logic              enable,
  input  logic [LENGTH-1:1] ctr,
  output logic [LENGTH-1:0] f
);

  // NAND stage (element 0): the feedback node.
  localparam int unsigned D_NAND = ro_pkg::element_delay(ELEM_DELAY, DELAY_SPREAD, 0);
  assign #(D_NAND * 1ps) f[0] = ~(f[1] & enable);

  // First stage takes the feedback node as its input.
  localparam int unsigned D_TOP = ro_pkg::element_delay(ELEM_DELAY, DELAY_SPREAD, LENGTH - 1);
  assign #(D_TOP * 1ps) f[LENGTH-1] = ~f[0] ^ (ctr[LENGTH-1] ? f[0] : 1'b0);

  for (genvar i = LENGTH - 2; i >= 1; i--) begin : g_stage
    localparam int unsigned D = ro_pkg::element_delay(ELEM_DELAY, DELAY_SPREAD, i);
    assign #(D * 1ps) f[i] = ~f[i+1] ^ (ctr[i] ? f[0] : 1'b0);
  end

endmodule
