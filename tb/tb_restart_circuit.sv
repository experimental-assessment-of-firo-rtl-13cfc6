// Self-checking testbench for restart_circuit.
//
// Runs experiments with random T_STABILISE, T_SAMPLE (including 0, which
// counts as 1), N_SAMPLES and a random out_ready pattern, and checks on
// every clock edge:
//  * enable stays low for exactly max(1, T_STABILISE) cycles before each
//    run,
//  * the sampling edge (sample high) comes exactly max(1, T_SAMPLE) cycles
//    after the edge that raised enable, once per sample,
//  * sample_valid is held, with enable high, until out_ready takes it,
//  * exactly N_SAMPLES samples are handed off, then busy falls,
//  * a start while busy is ignored.
// Stalls (sample_valid without out_ready) must occur.
module tb_restart_circuit;

  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, start = 0, out_ready = 1;
  logic [15:0] t_stabilise, t_sample;
  logic [23:0] n_samples;
  logic        enable, sample, sample_valid, stalled, busy;

  restart_circuit dut (
    .clk(clk), .rst_n(rst_n), .start(start),
    .t_stabilise(t_stabilise), .t_sample(t_sample), .n_samples(n_samples),
    .out_ready(out_ready),
    .enable(enable), .sample(sample), .sample_valid(sample_valid),
    .stalled(stalled), .busy(busy)
  );

  always #5ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor state
  int unsigned low_run, high_run, handed, samples_seen, stalls;
  int unsigned exp_stab, exp_smp;
  bit          armed;   // an experiment is running
  bit          got_sample;

  always @(posedge clk) if (rst_n && armed) begin
    // pre-edge values are read here
    if (stalled) stalls++;
    check(stalled == (sample_valid && !out_ready), "stalled flag");
    if (sample_valid) check(enable, "enable dropped while sample held");
    if (enable) begin
      if (low_run != 0) check(low_run == exp_stab, $sformatf("stabilise %0d cycles, expected %0d", low_run, exp_stab));
      low_run = 0;
      high_run++;
    end else begin
      if (busy) low_run++;
      high_run = 0;
      got_sample = 0;
    end
    if (sample) begin
      samples_seen++;
      check(high_run == exp_smp, $sformatf("sample after %0d cycles, expected %0d", high_run, exp_smp));
      check(!got_sample, "two sample pulses in one run");
      got_sample = 1;
    end
    if (sample_valid && out_ready) begin
      handed++;
      check(got_sample, "sample handed off without a sampling edge");
    end
    out_ready <= ($urandom_range(0, 2) != 0);
  end

  initial begin
    t_stabilise = '0; t_sample = '0; n_samples = '0; armed = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 40; e++) begin
      int unsigned cycles = 0;
      @(negedge clk);
      t_stabilise = 16'($urandom_range(0, 7));
      t_sample    = 16'($urandom_range(0, 9));
      n_samples   = 24'($urandom_range(1, 12));
      exp_stab = (t_stabilise == 0) ? 1 : t_stabilise;
      exp_smp  = (t_sample == 0) ? 1 : t_sample;
      low_run = 0; high_run = 0; handed = 0; samples_seen = 0; got_sample = 0;
      armed = 1;
      start = 1;
      @(negedge clk);
      start = 0;
      check(busy, "not busy after start");
      // a second start while busy must be ignored
      start = 1;
      @(negedge clk);
      start = 0;
      while (busy && cycles < 5000) begin
        @(negedge clk);
        cycles++;
      end
      armed = 0;
      check(!busy, "experiment did not end");
      check(handed == n_samples, $sformatf("handed %0d of %0d", handed, n_samples));
      check(samples_seen == n_samples, $sformatf("sampled %0d of %0d", samples_seen, n_samples));
      check(!enable && !sample_valid, "idle outputs");
    end
    // n_samples = 0 starts nothing
    @(negedge clk);
    n_samples = '0;
    start = 1;
    @(negedge clk);
    start = 0;
    check(!busy, "started with N_SAMPLES = 0");
    check(stalls > 0, "no stall happened");
    $display("stalls: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
