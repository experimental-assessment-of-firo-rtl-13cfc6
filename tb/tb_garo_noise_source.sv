// Self-checking testbench for garo_noise_source (length 11).
//
// The testbench plays the restart circuit: it holds enable low to
// stabilise the ring, raises it on a clock edge, pulses sample T_SAMPLE
// cycles later and then checks
//  * sample_out[j] against a reference ring's node f_j seen at the capture edge,
//  * d_bit = out_0, s_bit = XOR of all sample bits,
//  * t_bit = parity of the 0-1 transitions of out_0's node since the start,
//  * the clear of all outputs once enable falls.
// The clock has random period jitter so that runs differ. A configuration
// without fixed point (taps x^2..x^6 and x^9, the polynomial
// x^11 + x^9 + x^6 + x^5 + x^4 + x^3 + x^2 + 1) must give more than one
// distinct sample; with the single tap x^1 the ring rests in its fixed
// point and must always return the forced pattern.
module tb_garo_noise_source;

  localparam int unsigned R        = 11;
  localparam int unsigned T_SAMPLE = 6;
  localparam int unsigned RUNS     = 150;

  int checks = 0, failures = 0;

  logic         clk = 0, enable = 0, sample = 0;
  logic [R-1:1] ctr;
  logic [R-1:0] sample_out;
  logic         d_bit, t_bit, s_bit;

  garo_noise_source #(.LENGTH(R)) dut (
    .clk(clk), .enable(enable), .sample(sample), .ctr(ctr),
    .sample_out(sample_out), .d_bit(d_bit), .t_bit(t_bit), .s_bit(s_bit)
  );

  // Reference ring with the same parameters and inputs: its delays are
  // deterministic, so its nodes follow the ring inside the DUT exactly.
  logic [R-1:0] ref_f;
  garo_ring #(.LENGTH(R)) ref_ring (.enable(enable), .ctr(ctr), .f(ref_f));

  // clock with random jitter of up to +-150 ps per half period
  always begin
    #(5ns + real'($urandom_range(0, 300)) * 1ps - 150ps);
    clk = ~clk;
  end

  int unsigned rises;
  always @(posedge ref_f[0]) if (enable) rises++;

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
    for (int j = 0; j < R; j++) exp_s[j] = ref_f[j];
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

    // ctr = x^1 only: f_0 = 1, f_i = i mod 2 for i >= 2, f_1 = 0 (taps f_0)
    for (int j = 0; j < R; j++) forced[j] = bit'(j % 2);
    forced[0] = 1'b1;
    forced[1] = 1'b0;

    // fixed-point-free configuration with 6 taps
    ctr = 10'b0100111110;
    for (int n = 0; n < RUNS; n++) begin
      run_once(smp);
      seen[smp] = 1;
      ones_s += s_bit;
    end
    $display("distinct samples: %0d of %0d", seen.num(), RUNS);
    check(seen.num() > 1, "only one distinct sample");

    // one tap (odd weight, f(1) = 1): the forced start state is a fixed point
    ctr = 10'b0000000001;
    for (int n = 0; n < 20; n++) begin
      run_once(smp);
      check(smp == forced, $sformatf("fixed-point ring sample %b", smp));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
