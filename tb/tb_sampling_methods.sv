// Self-checking testbench for sampling_methods.
//
// The oscillating node is driven by the testbench from a random resting
// level with a random number of transitions between ring start and the
// sampling edge; the expected T-flip-flop bit is the number of 0-1
// transitions modulo 2. The state vector is random; the
// D bit must be its bit 0 and the state-sampling bit its parity.
module tb_sampling_methods;

  localparam int unsigned W = 10;
  int checks = 0, failures = 0;

  logic         clk = 0, enable, sample, ring_out;
  logic [W-1:0] state;
  logic         d_bit, t_bit, s_bit;

  sampling_methods #(.WIDTH(W)) dut (
    .clk(clk), .enable(enable), .sample(sample), .ring_out(ring_out),
    .state(state), .d_bit(d_bit), .t_bit(t_bit), .s_bit(s_bit)
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
    int unsigned ones_t = 0;
    enable = 0; sample = 0; ring_out = 0; state = '0;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      int unsigned rises;
      @(negedge clk);
      enable = 0;
      ring_out = 1'($urandom);      // the ring may rest at either level
      @(negedge clk);
      check(t_bit == 1'b0, "t_bit not cleared");
      enable = 1;
      rises = 0;
      // a random number of transitions of the ring node, all inside this
      // clock cycle; only the 0-1 transitions count
      for (int k = $urandom_range(0, 9); k > 0; k--) begin
        #300ps ring_out = ~ring_out;
        if (ring_out) rises++;
      end
      sample = 1;
      @(negedge clk);
      sample = 0;
      // extra ring edges after the sampling edge must not change t_bit
      #100ps ring_out = ~ring_out;
      #100ps ring_out = ~ring_out;
      check(t_bit == rises[0], $sformatf("t_bit %0d after %0d rises", t_bit, rises));
      ones_t += t_bit;
      state = W'($urandom);
      #1ns;
      check(d_bit == state[0], "d_bit");
      check(s_bit == ^state, "s_bit");
    end
    check(ones_t > 50 && ones_t < 250, "t_bit values not varied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
