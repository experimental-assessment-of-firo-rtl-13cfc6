// Workload testbench: the sampling-method comparison at the small lengths.
//
// Builds ro_assess_top with FIRO_LENGTH = 10 and GARO_LENGTH = 11 and runs
// the feedback vectors of the published sampling-method comparison (five
// FIRO_CTR and five GARO_CTR vectors). For each vector it collects
// N_SAMPLES samples through the host ports and reports the number of
// distinct raw samples and the Shannon entropy of the D-flip-flop,
// T-flip-flop and state-sampling bits.
//
// The ring delays of the model are fixed and the only randomness is the
// clock jitter of this testbench, so the numbers describe the model, not
// silicon; they are printed, not compared. The FIRO vector
// [1,1,1,1,1,1,1,0,0] is run as printed in the comparison table, although
// its seven ones contradict the six taps listed with it: with an odd
// number of taps f(1) = 1, the forced start state is a fixed point and the
// ring does not start. What is checked: a vector whose forced start state
// is a fixed point yields a single distinct sample, any other more than
// one; every
// experiment returns exactly N_SAMPLES words with the right source flag,
// zero padding, D bit = out_0 and state bit = parity of the state, and the
// experiment takes N * (T_STABILISE + T_SAMPLE + 1) cycles.
module tb_workload_sampling;

  import ro_pkg::*;

  localparam int unsigned FL = 10, GL = 11;
  localparam int unsigned N  = 400;
  localparam int unsigned TS = 4, TP = 20;

  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic        host_wr_en = 0, host_rd_en = 0;
  logic [31:0] host_wr_data = '0, host_rd_data;
  logic        host_wr_full, host_rd_empty, busy, stalled;

  ro_assess_top #(.FIRO_LENGTH(FL), .GARO_LENGTH(GL)) dut (
    .clk(clk), .rst_n(rst_n),
    .host_wr_en(host_wr_en), .host_wr_data(host_wr_data), .host_wr_full(host_wr_full),
    .host_rd_en(host_rd_en), .host_rd_data(host_rd_data), .host_rd_empty(host_rd_empty),
    .busy(busy), .stalled(stalled)
  );

  always begin
    #(5ns + real'($urandom_range(0, 300)) * 1ps - 150ps);
    clk = ~clk;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_word_t rx[$];

  always @(negedge clk) begin
    host_rd_en <= 1'b0;
    if (!host_rd_empty) begin
      rx.push_back(sample_word_t'(host_rd_data));
      host_rd_en <= 1'b1;
    end
  end

  int unsigned busy_cycles = 0;
  logic        busy_q = 0;
  always @(negedge clk) begin
    if (busy && !busy_q) busy_cycles = 0;
    if (busy) busy_cycles++;
    busy_q = busy;
  end

  task automatic send(input opcode_e op, input int unsigned data);
    @(negedge clk);
    while (host_wr_full) @(negedge clk);
    host_wr_en   = 1;
    host_wr_data = {op, 28'(data)};
    @(negedge clk);
    host_wr_en   = 0;
  endtask

  function automatic real entropy(int unsigned ones, int unsigned n);
    real p = real'(ones) / real'(n);
    if (p <= 0.0 || p >= 1.0) return 0.0;
    return -(p * $ln(p) + (1.0 - p) * $ln(1.0 - p)) / $ln(2.0);
  endfunction

  // vector written as printed, x^1 first, turned into ctr[i] <-> x^i
  function automatic int unsigned from_list(string s);
    int unsigned v = 0;
    int unsigned i = 1;
    foreach (s[k]) if (s[k] == "0" || s[k] == "1") begin
      if (s[k] == "1") v |= 1 << (i - 1);
      i++;
    end
    return v;
  endfunction

  // Is the forced start state (enable low) a fixed point of the running ring?
  function automatic bit starts_fixed(bit garo, int unsigned c);
    if (!garo) begin
      // FIRO: f_i = i mod 2, feedback must reproduce f_0 = 0
      bit fb = bit'(FL % 2);
      for (int i = 1; i < FL; i++) if (c[i-1]) fb ^= bit'(i % 2);
      return fb == 1'b0;
    end else begin
      // GARO: f_0 = 1, NAND must reproduce it, i.e. f_1 = 0
      logic [GL-1:0] g;
      g[GL-1] = ~1'b1 ^ c[GL-2];
      for (int i = GL - 2; i >= 1; i--) g[i] = ~g[i+1] ^ c[i-1];
      return g[1] == 1'b0;
    end
  endfunction

  task automatic run(input bit garo, input string vec);
    bit          seen [logic [27:0]];
    int unsigned od = 0, ot = 0, os = 0;
    int unsigned len = garo ? GL : FL;
    rx.delete();
    send(OP_SELECT, garo);
    send(garo ? OP_GARO_CTR : OP_FIRO_CTR, from_list(vec));
    send(OP_START, N);
    while (!busy) @(negedge clk);
    while (busy) @(negedge clk);
    repeat (5) @(negedge clk);
    check(rx.size() == N, $sformatf("%s: %0d samples", vec, rx.size()));
    check(busy_cycles == N * (TS + TP + 1), $sformatf("%s: %0d cycles", vec, busy_cycles));
    foreach (rx[k]) begin
      check(rx[k].garo == garo, "source flag");
      check((rx[k].state >> len) == 0, "padding");
      check(rx[k].d_bit == rx[k].state[0], "D bit");
      check(rx[k].s_bit == ^rx[k].state, "state bit");
      seen[rx[k].state] = 1;
      od += rx[k].d_bit;
      ot += rx[k].t_bit;
      os += rx[k].s_bit;
    end
    if (starts_fixed(garo, from_list(vec)))
      check(seen.num() == 1, $sformatf("%s: fixed point but %0d samples", vec, seen.num()));
    else
      check(seen.num() > 1, $sformatf("%s: only one distinct sample", vec));
    $display("%s %s %s distinct %4d of %0d  SE D-FF %.5f  T-FF %.5f  state %.5f",
             garo ? "GARO" : "FIRO", vec,
             starts_fixed(garo, from_list(vec)) ? "(fixed point)" : "             ",
             seen.num(), N,
             entropy(od, N), entropy(ot, N), entropy(os, N));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(OP_T_STABILISE, TS);
    send(OP_T_SAMPLE, TP);
    run(0, "[0,0,0,1,0,0,1,0,0]");
    run(0, "[0,1,0,0,0,0,0,0,1]");
    run(0, "[1,1,1,0,1,1,1,1,1]");
    run(0, "[1,1,1,1,1,1,1,0,0]");
    run(0, "[1,1,1,1,1,1,1,0,1]");
    run(1, "[1,1,0,0,0,1,0,0,1,0]");
    run(1, "[1,1,0,0,1,1,0,0,0,0]");
    run(1, "[0,1,1,1,1,1,1,1,1,0]");
    run(1, "[0,1,1,1,1,0,1,0,1,0]");
    run(1, "[0,1,1,1,1,1,0,0,1,0]");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
