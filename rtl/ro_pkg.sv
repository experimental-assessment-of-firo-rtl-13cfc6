// Shared constants and types of the FIRO/GARO noise-source assessment design.
//
// The host talks to the FPGA through two 32-bit FIFO streams. Every word the
// host writes is a command: the top four bits select an experiment register,
// the low 28 bits carry its value. Every word the FPGA returns is one sample:
// the raw sampled ring state plus the three single-bit outputs of the
// D-flip-flop, T-flip-flop and state sampling methods. The command and sample
// word layouts are this design's own choice; the register names (FIRO_CTR,
// GARO_CTR, T_STABILISE, T_SAMPLE, N_SAMPLES) are the ones of the experiment
// set-up this RTL implements.
package ro_pkg;

  localparam int unsigned WORD_W     = 32;
  localparam int unsigned CMD_DATA_W = 28;
  localparam int unsigned STATE_W    = 28;  // room for ring lengths up to 28
  localparam int unsigned TIME_W     = 16;  // T_STABILISE / T_SAMPLE counter width
  localparam int unsigned NSMP_W     = 24;  // N_SAMPLES counter width

  // Command opcodes (bits 31:28 of a host word).
  typedef enum logic [3:0] {
    OP_NOP         = 4'h0,
    OP_FIRO_CTR    = 4'h1,  // data = FIRO_CTR, bit i-1 <-> x^i
    OP_GARO_CTR    = 4'h2,  // data = GARO_CTR, bit i-1 <-> x^i
    OP_T_STABILISE = 4'h3,  // data = stabilisation time in clock cycles
    OP_T_SAMPLE    = 4'h4,  // data = run time from ring start to sampling edge
    OP_SELECT      = 4'h5,  // data[0] = 0: FIRO under test, 1: GARO under test
    OP_START       = 4'h6   // data = N_SAMPLES, starts the experiment
  } opcode_e;

  typedef struct packed {
    opcode_e               op;
    logic [CMD_DATA_W-1:0] data;
  } cmd_word_t;

  // One sample returned to the host.
  typedef struct packed {
    logic               garo;   // 0: FIRO sample, 1: GARO sample
    logic               s_bit;  // state sampling: XOR of all sampled state bits
    logic               t_bit;  // T-flip-flop sampling
    logic               d_bit;  // D-flip-flop sampling of out_0
    logic [STATE_W-1:0] state;  // out_{r-1} .. out_0, zero-extended
  } sample_word_t;

  // Propagation delay of ring element i in picoseconds, used
  // only by simulation. Each element gets base + a fixed per-element offset
  // in [0, spread), which models placement and process mismatch between
  // otherwise identical look-up tables. Synthesis ignores these delays.
  function automatic int unsigned element_delay(int unsigned base,
                                                int unsigned spread,
                                                int unsigned i);
    return base + ((i * 37 + 11) % (spread == 0 ? 1 : spread));
  endfunction

endpackage
