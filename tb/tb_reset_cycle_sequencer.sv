// tb_reset_cycle_sequencer: self-checking testbench of the evaluation sequencer.
//
// The sequencer drives a 3-instance secure AND-gate array. For 60 evaluations with random
// operand shares and a random mode it checks, cycle by cycle after start is accepted:
//   - the gate inputs: pair 1, pair 2 back to back when insecure; pair 1, a (0,0) reset cycle,
//     pair 2 when secure; (0,0) in every other cycle; gate_valid high exactly on the pairs;
//   - ready low while busy, and done one cycle wide, after 3 + 4 cycles (insecure) or
//     4 + 4 cycles (secure);
//   - the collected output shares of both pairs against the AND of the unmasked operands.
module tb_reset_cycle_sequencer;
  import masked_and_pkg::*;

  localparam int N = 3;

  logic         clk = 1'b0;
  logic         rst_n, start, secure_mode, ready, done;
  share_t       a1, b1, a2, b2, ga, gb;
  logic         gv, rv;
  logic [N-1:0] rq0, rq1, f0, f1, s0, s1;
  int           checks = 0;
  int           failures = 0;
  int           n_secure = 0, n_insecure = 0;

  reset_cycle_sequencer #(.N_INST(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .secure_mode(secure_mode),
    .a_first(a1), .b_first(b1), .a_second(a2), .b_second(b2), .ready(ready),
    .gate_a(ga), .gate_b(gb), .gate_valid(gv),
    .res_valid(rv), .res_q0(rq0), .res_q1(rq1),
    .done(done), .first_q0(f0), .first_q1(f1), .second_q0(s0), .second_q1(s1));

  secure_and_array #(.N_INST(N)) u_array (
    .clk(clk), .rst_n(rst_n), .in_valid(gv), .a(ga), .b(gb),
    .out_valid(rv), .q0(rq0), .q1(rq1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic unmask(share_t s);
    return s.s0 ^ s.s1;
  endfunction

  task automatic check(bit ok, string what, int op, int k);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL op %0d cycle %0d: %s", op, k, what);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; secure_mode = 1'b0;
    a1 = SHARE_ZERO; b1 = SHARE_ZERO; a2 = SHARE_ZERO; b2 = SHARE_ZERO;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 60; op++) begin
      share_t x1a, x1b, x2a, x2b;
      bit     sec;
      int     done_at, pair2_at;
      x1a = share_t'($urandom_range(0, 3)); x1b = share_t'($urandom_range(0, 3));
      x2a = share_t'($urandom_range(0, 3)); x2b = share_t'($urandom_range(0, 3));
      sec = 1'($urandom_range(0, 1));
      if (sec) n_secure++; else n_insecure++;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      check(ready === 1'b1, "ready when idle", op, 0);
      check(ga === SHARE_ZERO && gb === SHARE_ZERO && gv === 1'b0, "idle feeds (0,0)", op, 0);
      a1 = x1a; b1 = x1b; a2 = x2a; b2 = x2b; secure_mode = sec; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      // scramble the inputs: they must have been sampled at start
      a1 = share_t'($urandom_range(0, 3)); a2 = share_t'($urandom_range(0, 3));
      secure_mode = ~sec;
      pair2_at = sec ? 3 : 2;
      done_at  = -1;
      for (int k = 1; k <= 12; k++) begin
        if (k == 1)
          check(gv && ga === x1a && gb === x1b, "pair 1 on gate inputs", op, k);
        else if (k == pair2_at)
          check(gv && ga === x2a && gb === x2b, "pair 2 on gate inputs", op, k);
        else
          check(!gv && ga === SHARE_ZERO && gb === SHARE_ZERO, "(0,0) on gate inputs", op, k);
        if (done) begin
          check(done_at < 0, "single done pulse", op, k);
          if (done_at < 0) done_at = k;
        end
        if (done_at < 0) check(!ready, "busy until done", op, k);
        if (done_at == k) break;
        @(negedge clk);
      end
      check(done_at == (sec ? 4 : 3) + int'(GATE_LATENCY), $sformatf("done latency %0d", done_at),
            op, done_at);
      check(ready === 1'b1, "ready with done", op, done_at);
      check((f0 ^ f1) === {N{unmask(x1a) & unmask(x1b)}} && f1 === {N{x1a.s1}},
            "result of pair 1", op, done_at);
      check((s0 ^ s1) === {N{unmask(x2a) & unmask(x2b)}} && s1 === {N{x2a.s1}},
            "result of pair 2", op, done_at);
      @(negedge clk);
      check(!done, "done is one cycle", op, done_at + 1);
    end
    check(n_secure > 0 && n_insecure > 0, "both modes exercised", 0, 0);
    $display("secure evaluations %0d, insecure evaluations %0d", n_secure, n_insecure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
