// Self-checking testbench for firo_ring.
//
// A 10-element FIRO is stepped through all 512 FIRO_CTR vectors. For each:
//  * with enable low, every node must hold the forced pattern f_i = i mod 2
//    and the feedback node must equal f_r XOR the selected taps;
//  * with enable high, a configuration without fixed point must keep
//    oscillating, and a configuration for which the forced pattern is a
//    fixed point must not move at all.
// Fixed points are worked out here from the polynomial; the number of
// fixed-point-free vectors must be 2^(r-3) = 128, and 4 of them must have
// the maximum of r-2 = 8 taps. A second, 7-element FIRO
// with no taps is a plain ring oscillator whose period must be twice the
// sum of its element delays.
module tb_firo_ring;

  localparam int unsigned R  = 10;
  localparam int unsigned R7 = 7;
  localparam int unsigned INV = 250, XD = 230, SP = 23;

  int checks = 0, failures = 0;

  logic          en;
  logic [R-1:1]  ctr;
  logic [R:1]    f;
  logic          f0;

  firo_ring #(.LENGTH(R), .INV_DELAY(INV), .XOR_DELAY(XD), .DELAY_SPREAD(SP)) dut (
    .enable(en), .ctr(ctr), .f(f), .f0(f0)
  );

  logic          en7;
  logic [R7-1:1] ctr7;
  logic [R7:1]   f7;
  logic          f07;

  firo_ring #(.LENGTH(R7), .INV_DELAY(INV), .XOR_DELAY(XD), .DELAY_SPREAD(SP)) dut7 (
    .enable(en7), .ctr(ctr7), .f(f7), .f0(f07)
  );

  int unsigned edges;
  always @(f[R]) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Is the alternating pattern with f_1 = ~a a fixed point of the ring?
  function automatic bit is_fixed(int unsigned c, bit a);
    bit fb = a ^ bit'(R % 2);           // f_r = a ^ (r mod 2)
    for (int i = 1; i < R; i++)
      if (c[i-1]) fb ^= a ^ bit'(i % 2);
    return fb == a;
  endfunction

  function automatic int unsigned delay_of(int unsigned base, int unsigned i);
    return base + ((i * 37 + 11) % SP);
  endfunction

  initial begin : watchdog
    #5ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned free_cnt = 0;
    int unsigned max_taps_cnt = 0;
    int unsigned steady_cnt = 0;
    int unsigned osc_cnt = 0;
    en = 0; ctr = '0; edges = 0;
    en7 = 0; ctr7 = '0;

    for (int unsigned c = 0; c < (1 << (R-1)); c++) begin
      logic [R:1] exp_f;
      bit         exp_f0;
      bit         fp0, fp1;
      en  = 0;
      ctr = c[R-2:0];
      #20ns;
      for (int i = 1; i <= R; i++) exp_f[i] = bit'(i % 2);
      exp_f0 = exp_f[R];
      for (int i = 1; i < R; i++) if (c[i-1]) exp_f0 ^= exp_f[i];
      check(f == exp_f, $sformatf("ctr=%b stabilised state %b", ctr, f));
      check(f0 == exp_f0, $sformatf("ctr=%b stabilised feedback", ctr));

      fp0 = is_fixed(c, 1'b0);
      fp1 = is_fixed(c, 1'b1);
      en = 1;
      #60ns;
      edges = 0;
      #60ns;
      if (!fp0 && !fp1) begin
        free_cnt++;
        if ($countones(c) == R - 2) max_taps_cnt++;
        osc_cnt++;
        check(edges > 4, $sformatf("ctr=%b fixed-point free but %0d edges", ctr, edges));
      end else if (fp0) begin
        steady_cnt++;
        check(edges == 0, $sformatf("ctr=%b starts in a fixed point but moved", ctr));
      end
    end
    check(free_cnt == (1 << (R-3)), $sformatf("fixed-point-free count %0d", free_cnt));
    // even r: r-2 taps at most, in (largest even number <= r/2) vectors
    check(max_taps_cnt == 4, $sformatf("fixed-point-free vectors with %0d taps: %0d", R - 2, max_taps_cnt));
    $display("fixed-point free: %0d (with %0d taps: %0d), resting in fixed point: %0d",
             osc_cnt, R - 2, max_taps_cnt, steady_cnt);

    // Plain 7-element ring: period = 2 * (element delays + feedback LUTs).
    begin
      int unsigned sum = 0;
      realtime t1, t2;
      for (int i = 1; i <= R7; i++) sum += delay_of(INV, i);
      for (int i = 1; i < R7; i++)  sum += delay_of(XD, i + R7);
      en7 = 1;
      #30ns;
      @(posedge f7[R7]); t1 = $realtime;
      @(posedge f7[R7]); t2 = $realtime;
      check(((t2 - t1) - real'(2 * sum) * 1ps) < 0.5ps && (real'(2 * sum) * 1ps - (t2 - t1)) < 0.5ps,
            $sformatf("period %0t expected %0d ps", t2 - t1, 2 * sum));
      // stopping: enable low returns the forced pattern
      en7 = 0;
      #30ns;
      check(f7 == 7'b1010101, "7-element ring stopped pattern");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
