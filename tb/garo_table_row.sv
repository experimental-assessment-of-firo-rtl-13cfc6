// One row of the GARO tap table, checked on a garo_ring of length R.
//
// Steps through all 2^(R-1) GARO_CTR vectors. For each it works out from
// the stage equations whether the ring has a fixed point, then runs the
// ring: a fixed-point-free vector must keep oscillating, a vector whose
// forced start state is a fixed point must not move. Among fixed-point-free
// vectors with the top tap x^(R-1) clear it counts those with TAPS taps;
// the count must equal QTY. Sets `done` when finished.
module garo_table_row #(
  parameter int unsigned R    = 11,
  parameter int unsigned TAPS = 8,
  parameter int unsigned QTY  = 9
) (
  output int unsigned checks,
  output int unsigned failures,
  output bit          done
);

  logic         en;
  logic [R-1:1] ctr;
  logic [R-1:0] f;

  garo_ring #(.LENGTH(R)) ring (.enable(en), .ctr(ctr), .f(f));

  int unsigned edges;
  always @(f[0]) edges++;

  function automatic bit is_fixed(int unsigned c, bit a);
    logic [R-1:0] g;
    g[R-1] = ~a ^ (c[R-2] & a);
    for (int i = R - 2; i >= 1; i--) g[i] = ~g[i+1] ^ (c[i-1] & a);
    return ~g[1] == a;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL GARO r=%0d %s", R, what);
    end
  endtask

  initial begin
    int unsigned qty = 0;
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
        if (!c[R-2] && $countones(c) == TAPS) qty++;
      end else if (fp1) begin
        check(edges == 0, $sformatf("ctr=%b left its fixed point", ctr));
      end
    end
    check(qty == QTY, $sformatf("%0d vectors with %0d taps, table says %0d", qty, TAPS, QTY));
    $display("GARO_LENGTH %2d  taps %0d: %0d vectors", R, TAPS, qty);
    done = 1;
  end

endmodule
