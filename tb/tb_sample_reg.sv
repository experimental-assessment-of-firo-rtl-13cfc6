// Self-checking testbench for sample_reg: random data, random sample and
// enable patterns; the expected register value is tracked in the
// testbench (capture on clk with sample high, asynchronous clear while
// enable is low, hold otherwise).
module tb_sample_reg;

  localparam int unsigned W = 13;
  int checks = 0, failures = 0;

  logic         clk = 0, enable, sample;
  logic [W-1:0] d, q, exp_q;

  sample_reg #(.WIDTH(W)) dut (.clk(clk), .enable(enable), .sample(sample), .d(d), .q(q));

  always #5ns clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 0; sample = 0; d = '0; exp_q = '0;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL q=%h expected %h", q, exp_q);
      end
      d      = W'($urandom);
      sample = ($urandom_range(0, 3) == 0);
      // enable falls mid-cycle sometimes: asynchronous clear
      if ($urandom_range(0, 9) == 0) begin
        enable = 0;
        #1ns;
        exp_q = '0;
        checks++;
        if (q !== '0) begin
          failures++;
          $display("FAIL not cleared asynchronously");
        end
      end else begin
        enable = 1;
      end
      @(posedge clk);
      #1ns;
      if (enable && sample) exp_q = d;
      else if (!enable)     exp_q = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
