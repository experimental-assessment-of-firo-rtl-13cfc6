// Self-checking testbench for garo_ring.
//
// An 11-element GARO is stepped through all 1024 GARO_CTR vectors. For each:
//  * with enable low, f_0 must be 1 and every stage must hold the value
//    worked out here from the stage equation f_i = ~in_i ^ (ctr[i] & f_0);
//  * with enable high, a vector whose look-up-table level equations have no
//    fixed point must keep oscillating, and a vector for which the forced
//    start state is a fixed point must not move.
// Counts checked against the polynomial criterion (r odd, f(1) = 0):
// 2^(r-2) - 1 non-zero fixed-point-free vectors, r-2 = 9 of them with
// the maximum r-3 = 8 taps and x^(r-1) clear, all of them without a
// fixed point at look-up-table level. With the top bit ctr[r-1] set, stage
// r-1 must output a constant 1 while the ring runs (its LUT computes
// ~f_0 ^ f_0), so the feedback cannot pass through that stage.
module tb_garo_ring;

  localparam int unsigned R = 11;

  int checks = 0, failures = 0;

  logic         en;
  logic [R-1:1] ctr;
  logic [R-1:0] f;

  garo_ring #(.LENGTH(R)) dut (.enable(en), .ctr(ctr), .f(f));

  int unsigned edges, top_edges;
  always @(f[0]) edges++;
  always @(f[R-1]) top_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Stage values for a given f_0 (the ring cut open at the NAND).
  function automatic logic [R-1:0] chain(int unsigned c, bit a);
    logic [R-1:0] g;
    g[0] = a;
    g[R-1] = ~a ^ (c[R-2] & a);
    for (int i = R - 2; i >= 1; i--) g[i] = ~g[i+1] ^ (c[i-1] & a);
    return g;
  endfunction

  function automatic bit is_fixed(int unsigned c, bit a);
    logic [R-1:0] g = chain(c, a);
    return ~g[1] == a;
  endfunction

  initial begin : watchdog
    #5ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned poly_free = 0, poly_free_lut_fp = 0, lut_free = 0, steady = 0, msb_set = 0, max_taps = 0;
    en = 0; ctr = '0; edges = 0;

    for (int unsigned c = 0; c < (1 << (R-1)); c++) begin
      bit fp0, fp1, poly_ok;
      en  = 0;
      ctr = c[R-2:0];
      #20ns;
      check(f == chain(c, 1'b1), $sformatf("ctr=%b stabilised state %b", ctr, f));

      fp0 = is_fixed(c, 1'b0);
      fp1 = is_fixed(c, 1'b1);
      poly_ok = ($countones(c) % 2 == 0) && (c != 0);
      if (poly_ok) begin
        poly_free++;
        if (!c[R-2] && $countones(c) == R - 3) max_taps++;
        if (fp0 || fp1) poly_free_lut_fp++;
        if (!c[R-2]) check(!fp0 && !fp1, $sformatf("ctr=%b msb clear but fixed point", ctr));
      end

      en = 1;
      #60ns;
      edges = 0;
      top_edges = 0;
      #60ns;
      if (c[R-2]) begin
        msb_set++;
        check(top_edges == 0 && f[R-1] == 1'b1,
              $sformatf("ctr=%b msb set but stage r-1 not constant 1", ctr));
      end
      if (!fp0 && !fp1) begin
        lut_free++;
        check(edges > 4, $sformatf("ctr=%b fixed-point free but %0d edges", ctr, edges));
      end else if (fp1) begin
        steady++;
        check(edges == 0, $sformatf("ctr=%b starts in a fixed point but moved", ctr));
      end
    end
    check(poly_free == (1 << (R-2)) - 1, $sformatf("polynomial fixed-point-free count %0d", poly_free));
    check(max_taps == R - 2, $sformatf("%0d vectors with r-3 taps and msb clear", max_taps));
    check(poly_free_lut_fp == 0, "fixed point despite the polynomial criterion");
    check(msb_set == (1 << (R-2)), "msb-set vectors visited");
    $display("polynomial-free %0d, of which with LUT-level fixed point %0d, LUT-level free %0d, resting %0d",
             poly_free, poly_free_lut_fp, lut_free, steady);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
