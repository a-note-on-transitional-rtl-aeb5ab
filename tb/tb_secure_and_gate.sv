// tb_secure_and_gate: self-checking testbench of the two-share secure AND gate.
//
// 1. Function and latency: 400 random operand pairs streamed one per cycle; every output pair
//    must satisfy q0 ^ q1 = (a0 ^ a1) & (b0 ^ b1) and q1 = a1, exactly four cycles later.
// 2. The published leakage table (toggles of the [a0 b0] register): with masks (a^1, b^1, a^2, b^2) =
//    (m0, m1, m1, m0^m1) and the two pairs fed back to back, the number of (m0, m1) values for
//    which the [a0 b0] register toggles between the pairs must be 2, except for the four secret
//    combinations (b^2 a^2 b^1 a^1) = 0001, 0110, 1000, 1111 where it is 0.
// 3. For each of the 36 mask assignments in which the two operands of one cycle differ, back-to-
//    back pairs make the toggle count of [a0 b0] depend on the secrets, while with a (0,0) reset
//    cycle between the pairs no register of the gate toggles in a secret-dependent way.
// Register values are read through hierarchical references to the gate's stage registers.
module tb_secure_and_gate;
  import masked_and_pkg::*;

  localparam int NREG = 14;
  localparam int NCYC = 9;

  logic   clk = 1'b0;
  logic   rst_n;
  share_t a, b, q;
  int     checks = 0;
  int     failures = 0;

  secure_and_gate dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NREG-1:0] regs();
    return {dut.a_r.s1, dut.a_r.s0, dut.b_r.s1, dut.b_r.s0,
            dut.p00, dut.p01, dut.p10, dut.p11, dut.a1_s2,
            dut.t1, dut.t2, dut.a1_s3, dut.q.s0, dut.q.s1};
  endfunction
  localparam int P00 = NREG - 5;   // bit position of p00 in regs()

  function automatic logic msel(int sel, logic m0, logic m1);
    return (sel == 0) ? m0 : (sel == 1) ? m1 : (m0 ^ m1);
  endfunction

  function automatic share_t mk(logic x, logic mask);
    share_t s;
    s.s1 = mask;
    s.s0 = x ^ mask;
    return s;
  endfunction

  task automatic do_reset();
    a = SHARE_ZERO; b = SHARE_ZERO; rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Feeds pair 1, optionally a reset cycle, pair 2, then zeros; records all registers per cycle.
  task automatic run_pairs(share_t a1, share_t b1, share_t a2, share_t b2, bit with_reset,
                           output logic [NREG-1:0] trace [NCYC]);
    do_reset();
    for (int k = 0; k < NCYC; k++) begin
      if (k == 0)                            begin a = a1; b = b1; end
      else if (k == (with_reset ? 2 : 1))    begin a = a2; b = b2; end
      else                                   begin a = SHARE_ZERO; b = SHARE_ZERO; end
      @(negedge clk);
      trace[k] = regs();
    end
  endtask

  initial begin
    share_t           qa[$], qb[$];
    logic [NREG-1:0]  tr [NCYC];
    int               cnt [16][NCYC][NREG];
    int               table1_ones [16];
    int               p00_toggle_cycle;

    // ---------------- 1. function and latency -----------------
    do_reset();
    for (int k = 0; k < 404; k++) begin
      if (k >= GATE_LATENCY) begin
        share_t ea, eb;
        ea = qa.pop_front();
        eb = qb.pop_front();
        checks++;
        if ((q.s0 ^ q.s1) !== ((ea.s0 ^ ea.s1) & (eb.s0 ^ eb.s1)) || q.s1 !== ea.s1) begin
          failures++;
          if (failures < 10) $display("FAIL stream k=%0d a=%b b=%b q=%b", k, ea, eb, q);
        end
      end
      a = share_t'($urandom_range(0, 3));
      b = share_t'($urandom_range(0, 3));
      qa.push_back(a);
      qb.push_back(b);
      @(negedge clk);
    end

    // ---------------- 2. leakage table -----------------
    // x = 1 counts from the table, indexed by {b^2, a^2, b^1, a^1}
    table1_ones = '{2, 0, 2, 2, 2, 2, 0, 2, 0, 2, 2, 2, 2, 2, 2, 0};
    // back to back: p00 holds pair 1 after the second edge, pair 2 after the third
    p00_toggle_cycle = 2;
    for (int s = 0; s < 16; s++) begin
      int ones;
      ones = 0;
      for (int m = 0; m < 4; m++) begin
        logic m0, m1;
        logic sa1, sb1, sa2, sb2;
        m0 = m[0]; m1 = m[1];
        {sb2, sa2, sb1, sa1} = 4'(s);
        run_pairs(mk(sa1, m0), mk(sb1, m1), mk(sa2, m1), mk(sb2, m0 ^ m1), 1'b0, tr);
        ones += (tr[p00_toggle_cycle][P00] != tr[p00_toggle_cycle-1][P00]) ? 1 : 0;
      end
      checks++;
      if (ones != table1_ones[s]) begin
        failures++;
        $display("FAIL table1 row %b: x=1 in %0d of 4, expected %0d", 4'(s), ones, table1_ones[s]);
      end
    end

    // ---------------- 3. all 36 mask assignments, both schedules -----------------
    for (int c = 0; c < 81; c++) begin
      int ma1, mb1, ma2, mb2;
      ma1 = c % 3; mb1 = (c / 3) % 3; ma2 = (c / 9) % 3; mb2 = (c / 27) % 3;
      if (ma1 == mb1 || ma2 == mb2) continue;
      for (int mode = 0; mode < 2; mode++) begin
        bit dependent_p00;
        bit dependent_any;
        dependent_p00 = 1'b0;
        dependent_any = 1'b0;
        foreach (cnt[s, k, r]) cnt[s][k][r] = 0;
        for (int s = 0; s < 16; s++) begin
          for (int m = 0; m < 4; m++) begin
            logic m0, m1;
            logic sa1, sb1, sa2, sb2;
            m0 = m[0]; m1 = m[1];
            {sb2, sa2, sb1, sa1} = 4'(s);
            run_pairs(mk(sa1, msel(ma1, m0, m1)), mk(sb1, msel(mb1, m0, m1)),
                      mk(sa2, msel(ma2, m0, m1)), mk(sb2, msel(mb2, m0, m1)), mode == 1, tr);
            for (int k = 0; k < NCYC; k++)
              for (int r = 0; r < NREG; r++)
                cnt[s][k][r] += (tr[k][r] != ((k == 0) ? 1'b0 : tr[k-1][r])) ? 1 : 0;
          end
        end
        for (int s = 1; s < 16; s++)
          for (int k = 0; k < NCYC; k++)
            for (int r = 0; r < NREG; r++)
              if (cnt[s][k][r] != cnt[0][k][r]) begin
                dependent_any = 1'b1;
                if (r == P00) dependent_p00 = 1'b1;
              end
        checks++;
        if (mode == 0 && !dependent_p00) begin
          failures++;
          $display("FAIL masks %0d%0d%0d%0d back to back: p00 toggles do not depend on secrets",
                   ma1, mb1, ma2, mb2);
        end
        if (mode == 1 && dependent_any) begin
          failures++;
          $display("FAIL masks %0d%0d%0d%0d with reset cycle: a register leaks", ma1, mb1, ma2, mb2);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
