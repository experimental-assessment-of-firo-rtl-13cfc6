// End-to-end testbench for ro_assess_top at its default sizes
// (FIRO length 16, GARO length 15, 16-word command FIFO, 512-word sample
// FIFO). The testbench plays the host: it writes command words and reads
// sample words. The clock carries random period jitter so that ring runs
// differ from one another.
//
// Experiments:
//  A  FIRO with a fixed-point-free FIRO_CTR of the maximum 14 taps,
//     700 samples; the host reads nothing until the sample FIFO has filled
//     and the restart circuit has stalled. The commands of B are queued
//     meanwhile and must wait until A ends.
//  B  GARO with 12 taps and x^14 clear (the recommended set), 200 samples,
//     read continuously; B's sample words must carry the GARO flag, which
//     shows the queued commands took effect only after A. B must take exactly
//     N * (T_STABILISE + T_SAMPLE + 1) clock cycles.
//  C  GARO with the single tap x^1: the forced start state is a fixed
//     point, every sample must be that state.
//  D  FIRO without taps (even length, fixed point): likewise.
// Every sample word is checked for its source flag, zero padding, the
// D bit (= out_0) and the state-sampling bit (= parity of the state).
// Each mechanism (FIRO run, GARO run, mode switch, stall, commands held
// while busy, stabilised fixed point) is counted and must occur.
module tb_ro_assess_top;

  import ro_pkg::*;

  localparam int unsigned FL = 16, GL = 15;

  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic        host_wr_en = 0, host_rd_en = 0;
  logic [31:0] host_wr_data = '0, host_rd_data;
  logic        host_wr_full, host_rd_empty, busy, stalled;

  ro_assess_top dut (
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host side ----------------
  sample_word_t rx[$];
  bit           reading = 0;

  always @(negedge clk) begin
    host_rd_en <= 1'b0;
    if (reading && !host_rd_empty) begin
      rx.push_back(sample_word_t'(host_rd_data));
      host_rd_en <= 1'b1;
    end
  end

  task automatic send(input opcode_e op, input int unsigned data);
    @(negedge clk);
    while (host_wr_full) @(negedge clk);
    host_wr_en   = 1;
    host_wr_data = {op, 28'(data)};
    @(negedge clk);
    host_wr_en   = 0;
  endtask

  // ---------------- mechanism counters ----------------
  int unsigned n_stall_cycles = 0, n_firo_runs = 0, n_garo_runs = 0;
  int unsigned n_switches = 0, n_held_cmds = 0, n_fixed_ok = 0;
  logic        last_sel = 0;

  always @(negedge clk) if (rst_n) begin
    if (stalled) n_stall_cycles++;
    if (busy && !host_wr_full && host_wr_en) n_held_cmds++;
  end

  // ---------------- reference values ----------------
  function automatic bit firo_fixed(logic [FL-1:1] c, bit a);
    bit fb = a ^ bit'(FL % 2);
    for (int i = 1; i < FL; i++) if (c[i]) fb ^= a ^ bit'(i % 2);
    return fb == a;
  endfunction

  // Checks on one received word.
  task automatic check_word(input sample_word_t w, input bit garo, input int unsigned len);
    check(w.garo == garo, "source flag");
    check((w.state >> len) == 0, "state padding");
    check(w.d_bit == w.state[0], "D-flip-flop bit");
    check(w.s_bit == ^w.state, "state-sampling bit");
  endtask

  task automatic wait_done();
    int unsigned guard = 0;
    @(negedge clk);
    while (busy && guard < 100000) begin
      @(negedge clk);
      guard++;
    end
  endtask

  task automatic drain(input int unsigned n);
    int unsigned guard = 0;
    reading = 1;
    while (rx.size() < n && guard < 100000) begin
      @(negedge clk);
      guard++;
    end
    repeat (3) @(negedge clk);
    reading = 0;
  endtask

  initial begin
    logic [FL-1:1] firo_ctr_max;
    logic [GL-1:1] garo_ctr_max;
    bit            seen [logic [27:0]];
    int unsigned   ones;
    int unsigned   ts, tp, n;

    // A FIRO_CTR vector with 14 taps and no fixed point
    firo_ctr_max = '0;
    for (int skip = 1; skip < FL; skip++) begin
      logic [FL-1:1] c = '1;
      c[skip] = 1'b0;
      if (!firo_fixed(c, 0) && !firo_fixed(c, 1) && firo_ctr_max == '0) firo_ctr_max = c;
    end
    check(firo_ctr_max != '0, "no 14-tap fixed-point-free FIRO vector found");
    // GARO_CTR: x^1..x^13 except x^7 (12 taps, x^14 clear)
    garo_ctr_max = '0;
    for (int i = 1; i <= 13; i++) if (i != 7) garo_ctr_max[i] = 1'b1;

    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------- A: FIRO, sample FIFO overflow stall ----------
    ts = 4; tp = 8; n = 700;
    send(OP_SELECT, 0);
    send(OP_FIRO_CTR, 32'(firo_ctr_max));
    send(OP_T_STABILISE, ts);
    send(OP_T_SAMPLE, tp);
    send(OP_START, n);
    // queue B's configuration behind A while A is running
    ts = 5; tp = 11;
    send(OP_SELECT, 1);
    send(OP_GARO_CTR, 32'(garo_ctr_max));
    send(OP_T_STABILISE, ts);
    send(OP_T_SAMPLE, tp);
    check(busy, "A ended before B's commands were queued");
    // host does not read until the sample FIFO is full and the circuit stalls
    while (!stalled) @(negedge clk);
    repeat (50) @(negedge clk);
    check(stalled && busy, "stall not held");
    drain(700);
    wait_done();
    check(rx.size() == 700, $sformatf("A: %0d samples", rx.size()));
    ones = 0;
    foreach (rx[k]) begin
      check_word(rx[k], 1'b0, FL);
      seen[rx[k].state] = 1;
      ones += rx[k].s_bit;
    end
    $display("A FIRO r=%0d ctr=%b: %0d distinct of %0d, state bit ones %0d",
             FL, firo_ctr_max, seen.num(), rx.size(), ones);
    check(seen.num() > 1, "A: one distinct sample only");
    n_firo_runs++;
    rx.delete();
    seen.delete();

    // ---------- B: GARO, exact cycle count ----------
    n = 200;
    reading = 1;
    n_switches++;
    send(OP_START, n);
    while (!busy) @(negedge clk);
    while (busy) @(negedge clk);
    drain(n);
    check(busy_cycles == n * (ts + tp + 1),
          $sformatf("B: %0d cycles, expected %0d", busy_cycles, n * (ts + tp + 1)));
    check(rx.size() == n, $sformatf("B: %0d samples", rx.size()));
    ones = 0;
    foreach (rx[k]) begin
      check_word(rx[k], 1'b1, GL);
      seen[rx[k].state] = 1;
      ones += rx[k].s_bit;
    end
    $display("B GARO r=%0d ctr=%b: %0d distinct of %0d, state bit ones %0d",
             GL, garo_ctr_max, seen.num(), rx.size(), ones);
    check(seen.num() > 1, "B: one distinct sample only");
    n_garo_runs++;
    rx.delete();
    seen.delete();

    // ---------- C: GARO fixed point ----------
    begin
      logic [27:0] forced = '0;
      for (int j = 2; j < GL; j++) forced[j] = bit'(j % 2);
      forced[0] = 1'b1;
      send(OP_GARO_CTR, 1);
      send(OP_START, 20);
      drain(20);
      wait_done();
      check(rx.size() == 20, "C: sample count");
      foreach (rx[k]) begin
        check_word(rx[k], 1'b1, GL);
        check(rx[k].state == forced, $sformatf("C: sample %b", rx[k].state));
      end
      n_fixed_ok++;
      n_garo_runs++;
      rx.delete();
    end

    // ---------- D: FIRO fixed point ----------
    begin
      logic [27:0] forced = '0;
      for (int j = 0; j < FL; j++) forced[j] = bit'(j % 2);
      send(OP_SELECT, 0);
      n_switches++;
      send(OP_FIRO_CTR, 0);
      send(OP_START, 20);
      drain(20);
      wait_done();
      check(rx.size() == 20, "D: sample count");
      foreach (rx[k]) begin
        check_word(rx[k], 1'b0, FL);
        check(rx[k].state == forced, $sformatf("D: sample %b", rx[k].state));
      end
      n_fixed_ok++;
      n_firo_runs++;
      rx.delete();
    end

    $display("mechanisms: firo runs %0d, garo runs %0d, mode switches %0d, stall cycles %0d, commands written while busy %0d, fixed-point experiments %0d",
             n_firo_runs, n_garo_runs, n_switches, n_stall_cycles, n_held_cmds, n_fixed_ok);
    check(n_firo_runs > 0, "no FIRO run");
    check(n_garo_runs > 0, "no GARO run");
    check(n_switches > 0, "no mode switch");
    check(n_stall_cycles > 0, "no stall");
    check(n_held_cmds > 0, "no command held while busy");
    check(n_fixed_ok > 0, "no fixed-point experiment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clock cycles with busy high, counted per experiment (reset on start)
  int unsigned busy_cycles = 0;
  logic        busy_q = 0;
  always @(negedge clk) begin
    if (busy && !busy_q) busy_cycles = 0;
    if (busy) busy_cycles++;
    busy_q = busy;
  end

endmodule
