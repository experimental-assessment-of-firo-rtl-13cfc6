// Workload testbench: the tables of recommended feedback vectors.
//
// For FIRO lengths 4..14 and GARO lengths 5..13 the testbench runs every
// control vector on the ring RTL (firo_table_row, garo_table_row) and
// checks the number of fixed-point-free vectors with the maximum number of
// XOR taps against the known counts, and that each of them really
// oscillates in the model. FIRO lengths 15..20 and GARO lengths 15..19
// follow the same rules but are left out to keep the run short
// (2^(r-1) vectors per length).
module tb_workload_tables;

  localparam int unsigned NF = 11, NG = 5;

  int unsigned fc [NF], ff [NF];
  bit          fd [NF];
  int unsigned gc [NG], gf [NG];
  bit          gd [NG];

  firo_table_row #(.R(4),  .TAPS(2),  .QTY(2))                      f4  (fc[0],  ff[0],  fd[0]);
  firo_table_row #(.R(5),  .TAPS(4),  .QTY(1),  .TAPS2(2),  .QTY2(2))  f5  (fc[1],  ff[1],  fd[1]);
  firo_table_row #(.R(6),  .TAPS(4),  .QTY(2))                     f6  (fc[2],  ff[2],  fd[2]);
  firo_table_row #(.R(7),  .TAPS(4),  .QTY(9))                     f7  (fc[3],  ff[3],  fd[3]);
  firo_table_row #(.R(8),  .TAPS(6),  .QTY(4))                     f8  (fc[4],  ff[4],  fd[4]);
  firo_table_row #(.R(9),  .TAPS(8),  .QTY(1),  .TAPS2(6),  .QTY2(12)) f9  (fc[5],  ff[5],  fd[5]);
  firo_table_row #(.R(10), .TAPS(8),  .QTY(4))                     f10 (fc[6],  ff[6],  fd[6]);
  firo_table_row #(.R(11), .TAPS(8),  .QTY(25))                    f11 (fc[7],  ff[7],  fd[7]);
  firo_table_row #(.R(12), .TAPS(10), .QTY(6))                     f12 (fc[8],  ff[8],  fd[8]);
  firo_table_row #(.R(13), .TAPS(12), .QTY(1),  .TAPS2(10), .QTY2(30)) f13 (fc[9],  ff[9],  fd[9]);
  firo_table_row #(.R(14), .TAPS(12), .QTY(6))                     f14 (fc[10], ff[10], fd[10]);

  garo_table_row #(.R(5),  .TAPS(2),  .QTY(3))  g5  (gc[0], gf[0], gd[0]);
  garo_table_row #(.R(7),  .TAPS(4),  .QTY(5))  g7  (gc[1], gf[1], gd[1]);
  garo_table_row #(.R(9),  .TAPS(6),  .QTY(7))  g9  (gc[2], gf[2], gd[2]);
  garo_table_row #(.R(11), .TAPS(8),  .QTY(9))  g11 (gc[3], gf[3], gd[3]);
  garo_table_row #(.R(13), .TAPS(10), .QTY(11)) g13 (gc[4], gf[4], gd[4]);

  initial begin : watchdog
    #5ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int unsigned checks, failures;
    bit          all_done;
    all_done = 0;
    while (!all_done) begin
      #1us;
      all_done = 1;
      foreach (fd[k]) if (!fd[k]) all_done = 0;
      foreach (gd[k]) if (!gd[k]) all_done = 0;
    end
    checks = 0;
    failures = 0;
    foreach (fc[k]) begin checks += fc[k]; failures += ff[k]; end
    foreach (gc[k]) begin checks += gc[k]; failures += gf[k]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
