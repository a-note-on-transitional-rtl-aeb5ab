// tb_tl_eval_top: end-to-end testbench of the evaluation target at its default size (31 gates).
//
// Runs every combination of the four secret bits and the two random bits, once without and once
// with the reset cycle, followed by 200 random evaluations, and checks:
//   - both output-share pairs of all 31 gates against the AND of the secrets (q1 = mask of a),
//     and the start-to-done time (3 + 4 cycles insecure, 4 + 4 secure);
//   - the transitional leakage the design is about, from the cycle-by-cycle toggles of the
//     [a0 b0] register (p00) and the t1 register of gate 0 summed over the four mask values:
//     without reset cycle the p00 toggle count when pair 2 replaces pair 1 must follow the
//     published leakage table (2 of 4 mask values, 0 for secrets b^2 a^2 b^1 a^1 = 0001, 0110, 1000,
//     1111), so it depends on the secrets, and so does the t1 toggle count; with the reset cycle no cycle's toggle count of either
//     register may depend on the secrets, while toggles in two cycles taken jointly still do
//     (second-order leakage, which two shares cannot prevent);
//   - the AES plaintext sharing beside it: share0 ^ share1 = plaintext, mask byte repeated.
// Each mechanism (back-to-back pairs, reset cycle, both modes, AES sharing) is counted and a
// failure is counted for one that never happened. No parameter of the top is overridden.
module tb_tl_eval_top;
  import masked_and_pkg::*;

  localparam int N    = 31;
  localparam int NCYC = 9;

  logic         clk = 1'b0;
  logic         rst_n, start, secure_mode, m0, m1, ready, done;
  secrets_t     secrets;
  logic [N-1:0] f0, f1, s0, s1;
  logic [127:0] pt, sh0, sh1;
  logic         am0, am1;
  int           checks = 0;
  int           failures = 0;
  int           n_back_to_back = 0, n_reset_cycles = 0, n_secure = 0, n_insecure = 0, n_aes = 0;
  logic         gv_prev;

  tl_eval_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .secure_mode(secure_mode), .secrets(secrets),
    .m0(m0), .m1(m1), .ready(ready), .done(done),
    .first_q0(f0), .first_q1(f1), .second_q0(s0), .second_q1(s1),
    .aes_plaintext(pt), .aes_m0(am0), .aes_m1(am1), .aes_share0(sh0), .aes_share1(sh1));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitor on the gate-array inputs: two pairs in consecutive cycles, and a reset
  // cycle (no pair) directly between two pairs.
  logic gv_prev2;
  always @(posedge clk) begin
    if (!rst_n) begin
      gv_prev  <= 1'b0;
      gv_prev2 <= 1'b0;
    end else begin
      if (dut.gate_valid && gv_prev) n_back_to_back++;
      if (dut.gate_valid && !gv_prev && gv_prev2) n_reset_cycles++;
      gv_prev  <= dut.gate_valid;
      gv_prev2 <= gv_prev;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // One evaluation; returns the per-cycle values of p00 and t1 of gate 0.
  task automatic evaluate(secrets_t sec, logic rm0, logic rm1, bit secure,
                          output logic [NCYC-1:0] p00_tr, output logic [NCYC-1:0] t1_tr);
    logic pa, pb;
    int   done_at;
    while (!ready) @(negedge clk);
    secrets = sec; m0 = rm0; m1 = rm1; secure_mode = secure; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    secrets = secrets_t'($urandom_range(0, 15));
    done_at = -1;
    p00_tr  = '0;
    t1_tr   = '0;
    for (int k = 1; k <= 12 && done_at < 0; k++) begin
      if (k < NCYC) begin
        p00_tr[k] = dut.u_array.g_inst[0].u_gate.p00;
        t1_tr[k]  = dut.u_array.g_inst[0].u_gate.t1;
      end
      if (done) done_at = k;
      else @(negedge clk);
    end
    if (secure) n_secure++; else n_insecure++;
    check(done_at == (secure ? 4 : 3) + int'(GATE_LATENCY),
          $sformatf("done after %0d cycles, secure=%0d", done_at, secure));
    // results: share s1 of the output is the mask of a, s0 ^ s1 the AND
    pa = sec.a_first & sec.b_first;
    pb = sec.a_second & sec.b_second;
    check((f0 ^ f1) === {N{pa}} && f1 === {N{rm0}},
          $sformatf("pair 1 result secrets=%b m=%b%b", sec, rm1, rm0));
    check((s0 ^ s1) === {N{pb}} && s1 === {N{rm1}},
          $sformatf("pair 2 result secrets=%b m=%b%b", sec, rm1, rm0));
  endtask

  initial begin
    int table1_ones [16];
    int cnt_p00 [2][16][NCYC];
    int cnt_t1  [2][16][NCYC];
    int cnt_2nd [16][NCYC][NCYC];
    logic [NCYC-1:0] p00_tr, t1_tr;
    table1_ones = '{2, 0, 2, 2, 2, 2, 0, 2, 0, 2, 2, 2, 2, 2, 2, 0};
    foreach (cnt_p00[md, s, k]) begin
      cnt_p00[md][s][k] = 0;
      cnt_t1[md][s][k]  = 0;
    end
    foreach (cnt_2nd[s, k, j]) cnt_2nd[s][k][j] = 0;

    rst_n = 1'b0; start = 1'b0; secure_mode = 1'b0; secrets = '0; m0 = 1'b0; m1 = 1'b0;
    pt = '0; am0 = 1'b0; am1 = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // exhaustive sweep in both modes
    for (int md = 0; md < 2; md++) begin
      for (int s = 0; s < 16; s++) begin
        for (int m = 0; m < 4; m++) begin
          secrets_t sec;
          logic [3:0] tidx;
          sec  = secrets_t'(s);
          // the leakage table orders the secrets as {b^2, a^2, b^1, a^1}
          tidx = {sec.b_second, sec.a_second, sec.b_first, sec.a_first};
          evaluate(sec, m[0], m[1], md == 1, p00_tr, t1_tr);
          for (int k = 1; k < NCYC; k++) begin
            cnt_p00[md][tidx][k] += ((p00_tr[k] != p00_tr[k-1]) ? 1 : 0);
            cnt_t1[md][tidx][k]  += ((t1_tr[k] != t1_tr[k-1]) ? 1 : 0);
            if (md == 1)
              for (int j = 1; j < NCYC; j++)
                cnt_2nd[tidx][k][j] += ((p00_tr[k] != p00_tr[k-1] && p00_tr[j] != p00_tr[j-1]) ? 1 : 0);
          end
        end
      end
    end

    // insecure: p00 switches from pair 1 to pair 2 at cycle 4 after start; compare with the leakage table
    for (int t = 0; t < 16; t++)
      check(cnt_p00[0][t][4] == table1_ones[t],
            $sformatf("leakage table row %b: %0d toggles, expected %0d", 4'(t), cnt_p00[0][t][4],
                      table1_ones[t]));
    begin
      bit dep_insecure, dep_insecure_t1, dep_secure;
      dep_insecure = 1'b0;
      dep_insecure_t1 = 1'b0;
      dep_secure   = 1'b0;
      for (int t = 1; t < 16; t++)
        for (int k = 1; k < NCYC; k++) begin
          if (cnt_p00[0][t][k] != cnt_p00[0][0][k]) dep_insecure = 1'b1;
          if (cnt_t1[0][t][k] != cnt_t1[0][0][k]) dep_insecure_t1 = 1'b1;
          if (cnt_p00[1][t][k] != cnt_p00[1][0][k] || cnt_t1[1][t][k] != cnt_t1[1][0][k])
            dep_secure = 1'b1;
        end
      check(dep_insecure, "back-to-back pairs: p00 toggles should depend on the secrets");
      check(dep_insecure_t1, "back-to-back pairs: t1 toggles should depend on the secrets");
      check(!dep_secure, "reset cycle: toggles of p00 and t1 must not depend on the secrets");
    end
    // Second order: even with the reset cycle, whether p00 toggles in two different cycles
    // (one for each pair) depends on the secrets, since both pairs share the two random bits.
    begin
      bit dep_2nd;
      dep_2nd = 1'b0;
      for (int t = 1; t < 16; t++)
        for (int k = 1; k < NCYC; k++)
          for (int j = 1; j < NCYC; j++)
            if (cnt_2nd[t][k][j] != cnt_2nd[0][k][j]) dep_2nd = 1'b1;
      check(dep_2nd, "reset cycle: joint toggles of two cycles should still depend on the secrets");
    end

    // random evaluations
    for (int i = 0; i < 200; i++)
      evaluate(secrets_t'($urandom_range(0, 15)), 1'($urandom_range(0, 1)),
               1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), p00_tr, t1_tr);

    // AES plaintext sharing beside the evaluation target
    for (int i = 0; i < 40; i++) begin
      logic [7:0] mb;
      pt  = {$urandom, $urandom, $urandom, $urandom};
      am0 = 1'(i);
      am1 = 1'(i >> 1);
      #1;
      mb = {am1, am0 ^ am1, am0 ^ am1, am0, am0, am1, am0, am1};
      check((sh0 ^ sh1) === pt && sh1 === {16{mb}}, "AES plaintext sharing");
      n_aes++;
    end

    $display("mechanisms: back-to-back pairs %0d, reset cycles %0d, insecure evaluations %0d, secure evaluations %0d, AES sharings %0d",
             n_back_to_back, n_reset_cycles, n_insecure, n_secure, n_aes);
    check(n_back_to_back > 0, "back-to-back pairs never happened");
    check(n_reset_cycles > 0, "reset cycle never happened");
    check(n_insecure > 0, "insecure mode never used");
    check(n_secure > 0, "secure mode never used");
    check(n_aes > 0, "AES sharing never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
