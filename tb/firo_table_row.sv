// One row of the FIRO tap table, checked on a firo_ring of length R.
//
// Steps through all 2^(R-1) FIRO_CTR vectors. For each it works out from
// the polynomial whether the ring has a fixed point, then runs the ring:
// a fixed-point-free vector must keep oscillating, a vector whose forced
// start state is a fixed point must not move. Among the fixed-point-free
// vectors it counts those with TAPS and TAPS2 taps; the counts must equal
// QTY and QTY2 (TAPS2 = 0: no second entry). Sets `done` when finished.
module firo_table_row #(
  parameter int unsigned R     = 10,
  parameter int unsigned TAPS  = 8,
  parameter int unsigned QTY   = 4,
  parameter int unsigned TAPS2 = 0,
  parameter int unsigned QTY2  = 0
) (
  output int unsigned checks,
  output int unsigned failures,
  output bit          done
);

  logic         en;
  logic [R-1:1] ctr;
  logic [R:1]   f;

  firo_ring #(.LENGTH(R)) ring (.enable(en), .ctr(ctr), .f(f), .f0());

  int unsigned edges;
  always @(f[R]) edges++;

  function automatic bit is_fixed(int unsigned c, bit a);
    bit fb = a ^ bit'(R % 2);
    for (int i = 1; i < R; i++) if (c[i-1]) fb ^= a ^ bit'(i % 2);
    return fb == a;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL FIRO r=%0d %s", R, what);
    end
  endtask

  initial begin
    int unsigned qty = 0, qty2 = 0;
    checks = 0; failures = 0; done = 0; en = 0; ctr = '0; edges = 0;
    for (int unsigned c = 0; c < (1 << (R - 1)); c++) begin
      bit fp0, fp1;
      en  = 0;
      ctr = c[R-2:0];
      #10ns;
      fp0 = is_fixed(c, 1'b0);
      fp1 = is_fixed(c, 1'b1);
      en = 1;
      #14ns;
      edges = 0;
      #20ns;
      if (!fp0 && !fp1) begin
        check(edges > 2, $sformatf("ctr=%b fixed-point free but still", ctr));
        if ($countones(c) == TAPS)  qty++;
        if ($countones(c) == TAPS2) qty2++;
      end else if (fp0) begin
        check(edges == 0, $sformatf("ctr=%b left its fixed point", ctr));
      end
    end
    check(qty == QTY, $sformatf("%0d vectors with %0d taps, table says %0d", qty, TAPS, QTY));
    if (TAPS2 != 0)
      check(qty2 == QTY2, $sformatf("%0d vectors with %0d taps, table says %0d", qty2, TAPS2, QTY2));
    $display("FIRO_LENGTH %2d  taps %0d: %0d vectors%s", R, TAPS, qty,
             TAPS2 != 0 ? $sformatf(" / taps %0d: %0d vectors", TAPS2, qty2) : "");
    done = 1;
  end

endmodule
