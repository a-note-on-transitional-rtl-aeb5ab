// secure_and_array: N_INST identical secure AND gates driven by the same operand shares.
//
// Replicating the gate multiplies the power signature of one gate, which raises the
// signal-to-noise ratio of a side-channel measurement; the evaluation target uses 31 copies.
// Every instance receives the same a and b; output shares come back as one bit per instance.
// in_valid marks cycles that carry an operand pair (not idle or reset cycles) and is delayed by
// GATE_LATENCY to out_valid, aligned with the output shares. The valid flag is this design's own
// addition; the gates themselves know nothing of it.
//
// Synthesis note: the copies are logically identical, so a synthesis tool will merge them unless
// told not to; the keep_hierarchy attribute asks it to keep each instance.
module secure_and_array
  import masked_and_pkg::*;
#(
  parameter int unsigned N_INST = 31
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  share_t            a,
  input  share_t            b,
  output logic              out_valid,
  output logic [N_INST-1:0] q0,
  output logic [N_INST-1:0] q1
);

  for (genvar i = 0; i < N_INST; i++) begin : g_inst
    share_t q_i;
    (* keep_hierarchy = "yes" *)
    secure_and_gate u_gate (
      .clk  (clk),
      .rst_n(rst_n),
      .a    (a),
      .b    (b),
      .q    (q_i)
    );
    assign q0[i] = q_i.s0;
    assign q1[i] = q_i.s1;
  end

  logic [GATE_LATENCY-1:0] valid_pipe;

  always_ff @(posedge clk) begin
    if (!rst_n) valid_pipe <= '0;
    else        valid_pipe <= {valid_pipe[GATE_LATENCY-2:0], in_valid};
  end

  assign out_valid = valid_pipe[GATE_LATENCY-1];

endmodule
