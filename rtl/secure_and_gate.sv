// secure_and_gate: first-order masked AND of two two-share bits, using no fresh randomness.
//
// Given a = (a1, a0) and b = (b1, b0) it returns q = (q1, q0) with q0 ^ q1 = (a0 ^ a1) & (b0 ^ b1).
// The output shares are
//   q0 = [ [ [a0 b0] ^ [a0 b1 ^ b1] ] ^ [ [a1 b0] ^ [a1 b1 ^ b1] ^ a1 ] ]      q1 = a1 (delayed)
// where the brackets mark registers. Since q0 = a&b ^ a1, the mask a1 carries over to the output.
// Registering every partial product before it is combined keeps glitches from mixing the
// shares of one input, which is what makes the gate first-order probing secure without
// randomness.
//
// Pipeline (one new operand pair per cycle, GATE_LATENCY = 4):
//   stage 1  a_r, b_r                input register; a reset cycle ((0,0) input) clears it
//   stage 2  p00 = a0 b0             p01 = a0 b1 ^ b1     p10 = a1 b0     p11 = a1 b1 ^ b1
//   stage 3  t1 = p00 ^ p01          t2 = p10 ^ p11 ^ a1
//   stage 4  q0 = t1 ^ t2            q1 = a1
// The register placement of stages 2 to 4 is that of the published gate. The input register
// (stage 1) is this design's choice for reaching four stages. The copy of a1 added into t2 and
// the copy output as q1 are taken from the same pipeline stage as the other terms, so that q0 and
// q1 of one operand pair leave the gate together.
//
// Caution: when consecutive operand pairs share masks, the transitions of p00 (and of t1) depend on
// the secrets, i.e. the gate leaks in a Hamming-distance model. Feeding (0,0) between operand
// pairs (a reset cycle) removes that; see reset_cycle_sequencer.
//
// rst_n is synchronous and active low; it clears every stage to the state a (0,0) input leaves.
module secure_and_gate
  import masked_and_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  share_t a,
  input  share_t b,
  output share_t q
);

  // stage 1
  share_t a_r, b_r;
  // stage 2
  logic   p00, p01, p10, p11, a1_s2;
  // stage 3
  logic   t1, t2, a1_s3;
  // stage 4
  logic   q0_r, q1_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_r   <= SHARE_ZERO;
      b_r   <= SHARE_ZERO;
      p00   <= 1'b0;
      p01   <= 1'b0;
      p10   <= 1'b0;
      p11   <= 1'b0;
      a1_s2 <= 1'b0;
      t1    <= 1'b0;
      t2    <= 1'b0;
      a1_s3 <= 1'b0;
      q0_r  <= 1'b0;
      q1_r  <= 1'b0;
    end else begin
      a_r   <= a;
      b_r   <= b;
      p00   <= a_r.s0 & b_r.s0;
      p01   <= (a_r.s0 & b_r.s1) ^ b_r.s1;
      p10   <= a_r.s1 & b_r.s0;
      p11   <= (a_r.s1 & b_r.s1) ^ b_r.s1;
      a1_s2 <= a_r.s1;
      t1    <= p00 ^ p01;
      t2    <= p10 ^ p11 ^ a1_s2;
      a1_s3 <= a1_s2;
      q0_r  <= t1 ^ t2;
      q1_r  <= a1_s3;
    end
  end

  assign q = '{s1: q1_r, s0: q0_r};

endmodule
