// Restart circuit: sequences stabilise / run / sample for one experiment.
//
// On `start` it repeats n_samples times:
//   STABILISE  enable low for t_stabilise clock cycles, so every ring node
//              settles to its forced value and the next sample does not
//              depend on the previous one;
//   RUN        enable high for t_sample cycles; `sample` is high in the
//              last of them, so the capture edge comes exactly t_sample
//              clock periods after the edge that raised `enable`;
//   HAND-OFF   enable stays high (the sampled flip-flops keep their value)
//              and `sample_valid` is raised until `out_ready` accepts the
//              sample. A full result FIFO therefore stalls the sequence
//              with the ring still running and the sample held.
// After the last accepted sample the circuit returns to idle (enable low).
// A time value of 0 is treated as 1.
//
// The counter-based restart with T_STABILISE and T_SAMPLE is the published
// concept; the state encoding, the hand-off state and the stall behaviour
// are this design's own choices. `enable` and `sample` are register outputs,
// since `enable` drives asynchronous clears in the noise sources.
//
// Interface: start is a one-cycle pulse, accepted only while `busy` is low.
module restart_circuit #(
  parameter int unsigned TIME_W = ro_pkg::TIME_W,
  parameter int unsigned NSMP_W = ro_pkg::NSMP_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [TIME_W-1:0] t_stabilise,
  input  logic [TIME_W-1:0] t_sample,
  input  logic [NSMP_W-1:0] n_samples,
  input  logic              out_ready,
  output logic              enable,
  output logic              sample,
  output logic              sample_valid,
  output logic              stalled,
  output logic              busy
);

  typedef enum logic [1:0] {S_IDLE, S_STAB, S_RUN, S_HOLD} state_e;

  state_e            state, state_n;
  logic [TIME_W-1:0] cnt, cnt_n;
  logic [NSMP_W-1:0] left, left_n;

  function automatic logic [TIME_W-1:0] at_least_one(logic [TIME_W-1:0] v);
    return (v == '0) ? TIME_W'(1) : v;
  endfunction

  always_comb begin
    state_n = state;
    cnt_n   = cnt;
    left_n  = left;
    unique case (state)
      S_IDLE: if (start && n_samples != '0) begin
        state_n = S_STAB;
        cnt_n   = at_least_one(t_stabilise);
        left_n  = n_samples;
      end
      S_STAB: if (cnt == TIME_W'(1)) begin
        state_n = S_RUN;
        cnt_n   = at_least_one(t_sample);
      end else begin
        cnt_n = cnt - 1'b1;
      end
      S_RUN: if (cnt == TIME_W'(1)) begin
        state_n = S_HOLD;
      end else begin
        cnt_n = cnt - 1'b1;
      end
      S_HOLD: if (out_ready) begin
        left_n = left - 1'b1;
        if (left == NSMP_W'(1)) begin
          state_n = S_IDLE;
        end else begin
          state_n = S_STAB;
          cnt_n   = at_least_one(t_stabilise);
        end
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      left   <= '0;
      enable <= 1'b0;
      sample <= 1'b0;
    end else begin
      state  <= state_n;
      cnt    <= cnt_n;
      left   <= left_n;
      enable <= (state_n == S_RUN) || (state_n == S_HOLD);
      sample <= (state_n == S_RUN) && (cnt_n == TIME_W'(1));
    end
  end

  assign sample_valid = (state == S_HOLD);
  assign stalled      = (state == S_HOLD) && !out_ready;
  assign busy         = (state != S_IDLE);

endmodule
