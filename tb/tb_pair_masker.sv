// tb_pair_masker: self-checking testbench of the two-bit sharing of an evaluation's secrets.
//
// Exhaustive over the 16 secret combinations and the 4 values of (m0, m1), for the default mask
// assignment (m0, m1, m1, m0^m1) and for one other admissible assignment (m0^m1, m0, m0, m1):
// each share pair must XOR to its secret and share s1 must equal the expected mask.
module tb_pair_masker;
  import masked_and_pkg::*;

  secrets_t sec;
  logic     m0, m1;
  share_t   d_a1, d_b1, d_a2, d_b2;
  share_t   o_a1, o_b1, o_a2, o_b2;
  int       checks = 0;
  int       failures = 0;

  pair_masker dut_default (.secrets(sec), .m0(m0), .m1(m1),
                           .a_first(d_a1), .b_first(d_b1), .a_second(d_a2), .b_second(d_b2));

  pair_masker #(.MASK_A_FIRST(MASK_M01), .MASK_B_FIRST(MASK_M0),
                .MASK_A_SECOND(MASK_M0), .MASK_B_SECOND(MASK_M1))
    dut_other (.secrets(sec), .m0(m0), .m1(m1),
               .a_first(o_a1), .b_first(o_b1), .a_second(o_a2), .b_second(o_b2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_share(string what, share_t got, logic secret, logic mask);
    checks++;
    if (got.s1 !== mask || (got.s0 ^ got.s1) !== secret) begin
      failures++;
      $display("FAIL %s secrets=%b m0=%b m1=%b got=%b", what, sec, m0, m1, got);
    end
  endtask

  initial begin
    for (int s = 0; s < 16; s++) begin
      for (int m = 0; m < 4; m++) begin
        sec = secrets_t'(s);
        m0  = m[0];
        m1  = m[1];
        #1;
        expect_share("default a1", d_a1, sec.a_first,  m0);
        expect_share("default b1", d_b1, sec.b_first,  m1);
        expect_share("default a2", d_a2, sec.a_second, m1);
        expect_share("default b2", d_b2, sec.b_second, m0 ^ m1);
        expect_share("other a1",   o_a1, sec.a_first,  m0 ^ m1);
        expect_share("other b1",   o_b1, sec.b_first,  m0);
        expect_share("other a2",   o_a2, sec.a_second, m0);
        expect_share("other b2",   o_b2, sec.b_second, m1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
