// masked_and_pkg: types and constants shared by the two-share AND-gate evaluation design.
//
// A masked bit is carried as two shares, s0 and s1, whose XOR is the secret value. In this design
// share s1 holds the mask and share s0 holds secret XOR mask. Only two random bits, m0 and m1,
// exist per evaluation, so every mask is one of m0, m1 or m0 XOR m1 (mask_sel_e). The pipeline
// depth of the AND gate (four register stages) is fixed here because the register placement of
// the gate is fixed, not a free parameter.
package masked_and_pkg;

  // Register stages between the inputs of the secure AND gate and its output shares.
  localparam int unsigned GATE_LATENCY = 4;

  // A two-share masked bit; the secret is s1 ^ s0.
  typedef struct packed {
    logic s1;
    logic s0;
  } share_t;

  // The all-zero input that a reset cycle feeds into the gate.
  localparam share_t SHARE_ZERO = '{s1: 1'b0, s0: 1'b0};

  // The three masks that two random bits can provide.
  typedef enum logic [1:0] {
    MASK_M0  = 2'd0,
    MASK_M1  = 2'd1,
    MASK_M01 = 2'd2
  } mask_sel_e;

  // The four secret bits of one evaluation: operand pair (a^1, b^1) then (a^2, b^2).
  typedef struct packed {
    logic a_first;
    logic b_first;
    logic a_second;
    logic b_second;
  } secrets_t;

  function automatic logic mask_bit(mask_sel_e sel, logic m0, logic m1);
    case (sel)
      MASK_M0:  return m0;
      MASK_M1:  return m1;
      default:  return m0 ^ m1;
    endcase
  endfunction

  // Shares a secret bit: the mask goes in s1, secret ^ mask in s0.
  function automatic share_t share_bit(logic secret, logic mask);
    return '{s1: mask, s0: secret ^ mask};
  endfunction

endpackage
