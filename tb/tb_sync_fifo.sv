// Self-checking testbench for sync_fifo: random writes and reads against a
// queue model, never writing while full or reading while empty. Checks
// data order, show-ahead read data, the full/empty flags and the count,
// and that the FIFO does fill up and drain completely.
module tb_sync_fifo;

  localparam int unsigned W = 32, D = 8;
  int checks = 0, failures = 0;

  logic                 clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0]         wr_data = '0, rd_data;
  logic                 full, empty;
  logic [$clog2(D):0]   count;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_data(wr_data), .full(full),
    .rd_en(rd_en), .rd_data(rd_data), .empty(empty), .count(count)
  );

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] q[$];
    int unsigned fulls = 0, empties = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int unsigned bias;
      @(negedge clk);
      check(count == q.size(), $sformatf("count %0d, model %0d", count, q.size()));
      check(full == (q.size() == D), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      if (q.size() != 0) check(rd_data == q[0], "read data");
      if (full) fulls++;
      if (empty) empties++;
      bias  = ((n / 500) % 2 == 0) ? 3 : 1;   // phases of filling and draining
      wr_en = !full && ($urandom_range(0, 3) < bias);
      rd_en = !empty && ($urandom_range(0, 3) >= bias);
      wr_data = $urandom;
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    check(fulls > 0 && empties > 0, "never full or never empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
