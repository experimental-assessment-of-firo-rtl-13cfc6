// Self-checking testbench for firo_noise_source (length 10).
//
// The testbench plays the restart circuit: it holds enable low to
// stabilise the ring, raises it on a clock edge, pulses sample T_SAMPLE
// cycles later and then checks
//  * sample_out[j] against a reference ring's node f_{r-j} seen at the capture edge,
//  * d_bit = out_0, s_bit = XOR of all sample bits,
//  * t_bit = parity of the 0-1 transitions of out_0's node since the start,
//  * the clear of all outputs once enable falls.
// The clock has random period jitter so that runs differ. A configuration
// without fixed point (taps x^1..x^3, x^5..x^9) must give more than one
// distinct sample; the tap-less even ring rests in its fixed point and
// must always return the forced pattern.
module tb_firo_noise_source;

  localparam int unsigned R        = 10;
  localparam int unsigned T_SAMPLE = 6;
  localparam int unsigned RUNS     = 150;

  int checks = 0, failures = 0;

  logic         clk = 0, enable = 0, sample = 0;
  logic [R-1:1] ctr;
  logic [R-1:0] sample_out;
  logic         d_bit, t_bit, s_bit;

  firo_noise_source #(.LENGTH(R)) dut (
    .clk(clk), .enable(enable), .sample(sample), .ctr(ctr),
    .sample_out(sample_out), .d_bit(d_bit), .t_bit(t_bit), .s_bit(s_bit)
  );

  // Reference ring with the same parameters and inputs: its delays are
  // deterministic, so its nodes follow the ring inside the DUT exactly.
  logic [R:1] ref_f;
  firo_ring #(.LENGTH(R)) ref_ring (.enable(enable), .ctr(ctr), .f(ref_f), .f0());

  // clock with random jitter of up to +-150 ps per half period
  always begin
    #(5ns + real'($urandom_range(0, 300)) * 1ps - 150ps);
    clk = ~clk;
  end

  int unsigned rises;
  always @(posedge ref_f[R]) if (enable) rises++;

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

  task automatic run_once(output logic [R-1:0] smp);
    logic [R-1:0] exp_s;
    int unsigned  exp_rises;
    enable = 0;
    repeat (4) @(posedge clk);
    rises = 0;
    enable <= 1;
    repeat (T_SAMPLE - 1) @(posedge clk);
    sample <= 1;
    @(posedge clk);
    // values of the ring nodes at the capture edge
    for (int j = 0; j < R; j++) exp_s[j] = ref_f[R-j];
    exp_rises = rises;
    sample <= 0;
    @(negedge clk);
    check(sample_out == exp_s, $sformatf("sample %b expected %b", sample_out, exp_s));
    check(d_bit == exp_s[0], "d_bit");
    check(s_bit == ^exp_s, "s_bit");
    check(t_bit == exp_rises[0], $sformatf("t_bit after %0d rises", exp_rises));
    smp = sample_out;
    @(posedge clk);
    enable = 0;
    #1ns;
    check(sample_out == '0 && t_bit == 1'b0, "outputs not cleared");
  endtask

  initial begin
    logic [R-1:0] smp;
    bit seen [logic [R-1:0]];
    logic [R-1:0] forced;
    int unsigned ones_s = 0;

    for (int j = 0; j < R; j++) forced[j] = bit'((R - j) % 2);

    // fixed-point-free configuration with 8 taps
    ctr = 9'b111110111;
    for (int n = 0; n < RUNS; n++) begin
      run_once(smp);
      seen[smp] = 1;
      ones_s += s_bit;
    end
    $display("distinct samples: %0d of %0d", seen.num(), RUNS);
    check(seen.num() > 1, "only one distinct sample");

    // no taps, even length: the forced start state is a fixed point
    ctr = '0;
    for (int n = 0; n < 20; n++) begin
      run_once(smp);
      check(smp == forced, $sformatf("fixed-point ring sample %b", smp));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
