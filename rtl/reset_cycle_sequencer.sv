// reset_cycle_sequencer: drives one evaluation of the masked AND-gate pipeline and collects it.
//
// An evaluation feeds two masked operand pairs, (a^1, b^1) and (a^2, b^2), into the gate array.
// Because both pairs are masked with the same two random bits, feeding them in consecutive cycles
// lets the gate registers switch directly from a value of pair 1 to a value of pair 2, and the
// number of toggling bits then depends on the secrets. With secure_mode set, a reset cycle, in
// which all four shares are zero, is inserted between the pairs: every register first returns to
// zero, so each transition depends on one pair only. This halves the rate at which operand pairs
// enter the pipeline.
//
// Schedule of the gate inputs after start is accepted (one row per cycle):
//   insecure: pair 1, pair 2, (0,0) ...
//   secure:   pair 1, (0,0), pair 2, (0,0) ...
// Idle cycles also feed (0,0). gate_valid is high in the cycles that carry a pair.
//
// Handshake: start is taken when ready is high; the four operand shares are sampled then. The
// results of the two pairs are captured from the array when res_valid rises, in order, and done
// pulses for one cycle once both are held; ready returns in the same cycle. From start to done
// takes 3 + GATE_LATENCY cycles insecure and 4 + GATE_LATENCY secure.
// The schedule is the published one; the state machine and handshake are this design's own.
module reset_cycle_sequencer
  import masked_and_pkg::*;
#(
  parameter int unsigned N_INST = 31
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              start,
  input  logic              secure_mode,
  input  share_t            a_first,
  input  share_t            b_first,
  input  share_t            a_second,
  input  share_t            b_second,
  output logic              ready,
  // to the gate array
  output share_t            gate_a,
  output share_t            gate_b,
  output logic              gate_valid,
  // from the gate array
  input  logic              res_valid,
  input  logic [N_INST-1:0] res_q0,
  input  logic [N_INST-1:0] res_q1,
  // collected results
  output logic              done,
  output logic [N_INST-1:0] first_q0,
  output logic [N_INST-1:0] first_q1,
  output logic [N_INST-1:0] second_q0,
  output logic [N_INST-1:0] second_q1
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_FIRST,
    S_RESET,
    S_SECOND,
    S_WAIT
  } state_e;

  state_e state;
  logic   secure_r;
  logic   got_first;
  share_t a1_r, b1_r, a2_r, b2_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      secure_r  <= 1'b0;
      got_first <= 1'b0;
      done      <= 1'b0;
      a1_r      <= SHARE_ZERO;
      b1_r      <= SHARE_ZERO;
      a2_r      <= SHARE_ZERO;
      b2_r      <= SHARE_ZERO;
      first_q0  <= '0;
      first_q1  <= '0;
      second_q0 <= '0;
      second_q1 <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state     <= S_FIRST;
          secure_r  <= secure_mode;
          got_first <= 1'b0;
          a1_r      <= a_first;
          b1_r      <= b_first;
          a2_r      <= a_second;
          b2_r      <= b_second;
        end
        S_FIRST:  state <= secure_r ? S_RESET : S_SECOND;
        S_RESET:  state <= S_SECOND;
        S_SECOND: state <= S_WAIT;
        default:  ;
      endcase

      if (res_valid) begin
        if (!got_first) begin
          first_q0  <= res_q0;
          first_q1  <= res_q1;
          got_first <= 1'b1;
        end else begin
          second_q0 <= res_q0;
          second_q1 <= res_q1;
          done      <= 1'b1;
          state     <= S_IDLE;
        end
      end
    end
  end

  always_comb begin
    gate_a     = SHARE_ZERO;
    gate_b     = SHARE_ZERO;
    gate_valid = 1'b0;
    case (state)
      S_FIRST: begin
        gate_a     = a1_r;
        gate_b     = b1_r;
        gate_valid = 1'b1;
      end
      S_SECOND: begin
        gate_a     = a2_r;
        gate_b     = b2_r;
        gate_valid = 1'b1;
      end
      default: ;
    endcase
  end

  assign ready = (state == S_IDLE);

  // Results arrive only while an evaluation is in flight, and never before the first pair left.
  a_res_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid |-> (state != S_IDLE && state != S_FIRST));
  // The second result always ends the evaluation.
  a_done_ready: assert property (@(posedge clk) disable iff (!rst_n) done |-> ready);

endmodule
