// FPGA side of an assessment set-up for FIRO and GARO ring-oscillator
// noise sources.
//
// The host writes 32-bit command words into a command FIFO; config_regs
// turns them into the experiment registers (FIRO_CTR, GARO_CTR, T_STABILISE,
// T_SAMPLE, which ring is under test, N_SAMPLES) and starts an experiment.
// The restart_circuit then repeats, N_SAMPLES times: stop and stabilise the
// ring under test, let it run for T_SAMPLE cycles, sample its whole state,
// and hand one sample word (ro_pkg::sample_word_t) to the result FIFO, from
// which the host reads. Both a FIRO and a GARO noise source are built; the
// one not under test is held stopped. A full result FIFO stalls the
// sequence; commands arriving during an experiment wait in the command FIFO.
//
// The split into command FIFO, noise source under test, restart circuit
// and result FIFO follows the published assessment environment. The host
// link itself (a third-party PCIe/AXI bridge core in the original set-up)
// is not part of this RTL: its FIFO-side signals are this module's ports.
// Command and sample word formats, FIFO depths and the single clock domain
// are this design's choices.
//
// Timing: one clock `clk`, active-low asynchronous reset `rst_n`. Host
// ports follow the FIFO rules: write only while host_wr_full is low, read
// (show-ahead data on host_rd_data) only while host_rd_empty is low.
module ro_assess_top #(
  parameter int unsigned FIRO_LENGTH = 16,
  parameter int unsigned GARO_LENGTH = 15,
  parameter int unsigned CMD_DEPTH   = 16,
  parameter int unsigned SMP_DEPTH   = 512
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host -> FPGA command stream
  input  logic                      host_wr_en,
  input  logic [ro_pkg::WORD_W-1:0] host_wr_data,
  output logic                      host_wr_full,
  // FPGA -> host sample stream
  input  logic                      host_rd_en,
  output logic [ro_pkg::WORD_W-1:0] host_rd_data,
  output logic                      host_rd_empty,
  // status
  output logic                      busy,
  output logic                      stalled   // sample held, result FIFO full
);

  import ro_pkg::*;

  // ---- command path -------------------------------------------------------
  logic              cmd_empty, cmd_rd;
  logic [WORD_W-1:0] cmd_data;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(CMD_DEPTH)) u_cmd_fifo (
    .clk(clk), .rst_n(rst_n),
    .wr_en(host_wr_en), .wr_data(host_wr_data), .full(host_wr_full),
    .rd_en(cmd_rd), .rd_data(cmd_data), .empty(cmd_empty), .count()
  );

  logic [FIRO_LENGTH-1:1] firo_ctr;
  logic [GARO_LENGTH-1:1] garo_ctr;
  logic [TIME_W-1:0]      t_stabilise, t_sample;
  logic [NSMP_W-1:0]      n_samples;
  logic                   sel_garo, start;

  config_regs #(.FIRO_LENGTH(FIRO_LENGTH), .GARO_LENGTH(GARO_LENGTH)) u_cfg (
    .clk(clk), .rst_n(rst_n),
    .cmd_empty(cmd_empty), .cmd_data(cmd_data), .cmd_rd(cmd_rd),
    .busy(busy),
    .firo_ctr(firo_ctr), .garo_ctr(garo_ctr),
    .t_stabilise(t_stabilise), .t_sample(t_sample),
    .sel_garo(sel_garo), .n_samples(n_samples), .start(start)
  );

  // ---- restart circuit ----------------------------------------------------
  logic enable, sample, sample_valid, smp_full;

  restart_circuit u_restart (
    .clk(clk), .rst_n(rst_n), .start(start),
    .t_stabilise(t_stabilise), .t_sample(t_sample), .n_samples(n_samples),
    .out_ready(!smp_full),
    .enable(enable), .sample(sample), .sample_valid(sample_valid),
    .stalled(stalled), .busy(busy)
  );

  // Selection register: the ring under test may only change while idle,
  // config_regs guarantees that by not popping commands while busy.
  logic firo_en, garo_en;
  assign firo_en = enable && !sel_garo;
  assign garo_en = enable &&  sel_garo;

  // ---- noise sources under test -------------------------------------------
  logic [FIRO_LENGTH-1:0] firo_state;
  logic [GARO_LENGTH-1:0] garo_state;
  logic firo_d, firo_t, firo_s, garo_d, garo_t, garo_s;

  firo_noise_source #(.LENGTH(FIRO_LENGTH)) u_firo (
    .clk(clk), .enable(firo_en), .sample(sample && !sel_garo), .ctr(firo_ctr),
    .sample_out(firo_state), .d_bit(firo_d), .t_bit(firo_t), .s_bit(firo_s)
  );

  garo_noise_source #(.LENGTH(GARO_LENGTH)) u_garo (
    .clk(clk), .enable(garo_en), .sample(sample && sel_garo), .ctr(garo_ctr),
    .sample_out(garo_state), .d_bit(garo_d), .t_bit(garo_t), .s_bit(garo_s)
  );

  // ---- sample word and result path ----------------------------------------
  sample_word_t smp_word;

  always_comb begin
    smp_word      = '0;
    smp_word.garo = sel_garo;
    if (sel_garo) begin
      smp_word.state = STATE_W'(garo_state);
      smp_word.d_bit = garo_d;
      smp_word.t_bit = garo_t;
      smp_word.s_bit = garo_s;
    end else begin
      smp_word.state = STATE_W'(firo_state);
      smp_word.d_bit = firo_d;
      smp_word.t_bit = firo_t;
      smp_word.s_bit = firo_s;
    end
  end

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(SMP_DEPTH)) u_smp_fifo (
    .clk(clk), .rst_n(rst_n),
    .wr_en(sample_valid && !smp_full), .wr_data(smp_word), .full(smp_full),
    .rd_en(host_rd_en), .rd_data(host_rd_data), .empty(host_rd_empty),
    .count()
  );

  if (FIRO_LENGTH > STATE_W || GARO_LENGTH > STATE_W || FIRO_LENGTH < 3 || GARO_LENGTH < 3)
  begin : g_len_check
    $error("ring length must be 3..%0d", STATE_W);
  end

endmodule
