// Experiment configuration registers fed by host command words.
//
// Pops one command word per cycle from the show-ahead command FIFO and
// writes the register its opcode selects (see ro_pkg): FIRO_CTR, GARO_CTR,
// T_STABILISE, T_SAMPLE, the FIRO/GARO selection, or START, which loads
// N_SAMPLES and pulses `start` for one cycle. While an experiment runs
// (`busy` high) and in the cycle after a START no command is popped, so a
// host may queue the configuration of the next experiment behind the
// current one without disturbing it. Unknown opcodes are dropped.
// The set of registers is the published one; the command encoding and the
// hold-off while busy are this design's own choices.
// Registers reset to zero (FIRO selected, no taps, times of 0 = 1 cycle).
module config_regs #(
  parameter int unsigned FIRO_LENGTH = 16,
  parameter int unsigned GARO_LENGTH = 15
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             cmd_empty,
  input  logic [ro_pkg::WORD_W-1:0]        cmd_data,
  output logic                             cmd_rd,
  input  logic                             busy,
  output logic [FIRO_LENGTH-1:1]           firo_ctr,
  output logic [GARO_LENGTH-1:1]           garo_ctr,
  output logic [ro_pkg::TIME_W-1:0]        t_stabilise,
  output logic [ro_pkg::TIME_W-1:0]        t_sample,
  output logic                             sel_garo,
  output logic [ro_pkg::NSMP_W-1:0]        n_samples,
  output logic                             start
);

  import ro_pkg::*;

  cmd_word_t cmd;
  assign cmd    = cmd_word_t'(cmd_data);
  assign cmd_rd = !cmd_empty && !busy && !start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      firo_ctr    <= '0;
      garo_ctr    <= '0;
      t_stabilise <= '0;
      t_sample    <= '0;
      sel_garo    <= 1'b0;
      n_samples   <= '0;
      start       <= 1'b0;
    end else begin
      start <= 1'b0;
      if (cmd_rd) begin
        unique case (cmd.op)
          OP_FIRO_CTR:    firo_ctr    <= cmd.data[FIRO_LENGTH-2:0];
          OP_GARO_CTR:    garo_ctr    <= cmd.data[GARO_LENGTH-2:0];
          OP_T_STABILISE: t_stabilise <= cmd.data[TIME_W-1:0];
          OP_T_SAMPLE:    t_sample    <= cmd.data[TIME_W-1:0];
          OP_SELECT:      sel_garo    <= cmd.data[0];
          OP_START: begin
            n_samples <= cmd.data[NSMP_W-1:0];
            start     <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
