// tl_eval_top: side-channel evaluation target for transitional leakage of a masked AND gate.
//
// The target masks four secret bits (a^1, b^1, a^2, b^2) with two random bits m0 and m1
// (pair_masker), feeds the two operand pairs through N_INST = 31 parallel copies of the
// first-order secure AND gate (secure_and_array), with or without a reset cycle between them
// (reset_cycle_sequencer, secure_mode), and returns the output shares of both pairs for every
// copy. Running it once per measured trace with secure_mode low exposes the transitional leakage
// of the gate; with secure_mode high the leakage is removed at the cost of half the input rate.
//
// Beside it, and not connected to it, stands the initial sharing of a 128-bit AES plaintext with
// the same kind of two-bit mask (aes_state_masker), with ports of its own. The masked AES rounds
// that would follow are not part of this design, nor is the source of the random bits, which
// enter as ports.
//
// Timing: start is accepted while ready is high, with secrets, m0 and m1 sampled in that cycle;
// done pulses 3 + 4 (insecure) or 4 + 4 (secure) cycles later with the results held until the
// next evaluation finishes. rst_n is synchronous, active low.
module tl_eval_top
  import masked_and_pkg::*;
#(
  parameter int unsigned N_INST = 31
) (
  input  logic              clk,
  input  logic              rst_n,
  // AND-gate evaluation
  input  logic              start,
  input  logic              secure_mode,
  input  secrets_t          secrets,
  input  logic              m0,
  input  logic              m1,
  output logic              ready,
  output logic              done,
  output logic [N_INST-1:0] first_q0,
  output logic [N_INST-1:0] first_q1,
  output logic [N_INST-1:0] second_q0,
  output logic [N_INST-1:0] second_q1,
  // AES plaintext sharing
  input  logic [127:0]      aes_plaintext,
  input  logic              aes_m0,
  input  logic              aes_m1,
  output logic [127:0]      aes_share0,
  output logic [127:0]      aes_share1
);

  share_t            a_first, b_first, a_second, b_second;
  share_t            gate_a, gate_b;
  logic              gate_valid;
  logic              res_valid;
  logic [N_INST-1:0] res_q0, res_q1;

  pair_masker u_masker (
    .secrets (secrets),
    .m0      (m0),
    .m1      (m1),
    .a_first (a_first),
    .b_first (b_first),
    .a_second(a_second),
    .b_second(b_second)
  );

  reset_cycle_sequencer #(.N_INST(N_INST)) u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .secure_mode(secure_mode),
    .a_first    (a_first),
    .b_first    (b_first),
    .a_second   (a_second),
    .b_second   (b_second),
    .ready      (ready),
    .gate_a     (gate_a),
    .gate_b     (gate_b),
    .gate_valid (gate_valid),
    .res_valid  (res_valid),
    .res_q0     (res_q0),
    .res_q1     (res_q1),
    .done       (done),
    .first_q0   (first_q0),
    .first_q1   (first_q1),
    .second_q0  (second_q0),
    .second_q1  (second_q1)
  );

  secure_and_array #(.N_INST(N_INST)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (gate_valid),
    .a        (gate_a),
    .b        (gate_b),
    .out_valid(res_valid),
    .q0       (res_q0),
    .q1       (res_q1)
  );

  aes_state_masker #(.N_BYTES(16)) u_aes_masker (
    .plaintext(aes_plaintext),
    .m0       (aes_m0),
    .m1       (aes_m1),
    .share0   (aes_share0),
    .share1   (aes_share1)
  );

endmodule
