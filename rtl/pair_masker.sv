// pair_masker: shares the four secret bits of one evaluation using only two random bits.
//
// One evaluation of the AND gate processes two operand pairs, (a^1, b^1) and then (a^2, b^2).
// Each secret bit x is split as (s1, s0) = (mask, x ^ mask), where the mask is m0, m1 or
// m0 ^ m1. With the default masks (m0, m1, m1, m0 ^ m1) for (a^1, b^1, a^2, b^2) the two operands
// of one cycle always have different masks, as first-order probing security of the gate
// requires, while operands of different cycles reuse masks: this is the setting in which the gate
// leaks through transitions. The four mask choices are parameters, so every one of the 36
// admissible assignments can be built; an assertion rejects an assignment that gives both
// operands of one cycle the same mask.
//
// Purely combinational.
module pair_masker
  import masked_and_pkg::*;
#(
  parameter mask_sel_e MASK_A_FIRST  = MASK_M0,
  parameter mask_sel_e MASK_B_FIRST  = MASK_M1,
  parameter mask_sel_e MASK_A_SECOND = MASK_M1,
  parameter mask_sel_e MASK_B_SECOND = MASK_M01
) (
  input  secrets_t secrets,
  input  logic     m0,
  input  logic     m1,
  output share_t   a_first,
  output share_t   b_first,
  output share_t   a_second,
  output share_t   b_second
);

  initial begin
    assert (MASK_A_FIRST != MASK_B_FIRST && MASK_A_SECOND != MASK_B_SECOND)
      else $error("pair_masker: the two operands of one cycle must not share a mask");
  end

  always_comb begin
    a_first  = share_bit(secrets.a_first,  mask_bit(MASK_A_FIRST,  m0, m1));
    b_first  = share_bit(secrets.b_first,  mask_bit(MASK_B_FIRST,  m0, m1));
    a_second = share_bit(secrets.a_second, mask_bit(MASK_A_SECOND, m0, m1));
    b_second = share_bit(secrets.b_second, mask_bit(MASK_B_SECOND, m0, m1));
  end

endmodule
