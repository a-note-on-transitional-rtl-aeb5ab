// tb_aes_state_masker: self-checking testbench of the AES plaintext sharing.
//
// For 50 random plaintexts and each of the four values of (m0, m1), share0 ^ share1 must give
// back the plaintext and every byte of share1 must be the byte mask written out by hand:
// 8'h00 for (m0, m1) = (0, 0), 8'h7A for (1, 0), 8'hE5 for (0, 1), 8'h9F for (1, 1).
module tb_aes_state_masker;

  logic [127:0] pt, s0, s1;
  logic         m0, m1;
  int           checks = 0;
  int           failures = 0;

  aes_state_masker dut (.plaintext(pt), .m0(m0), .m1(m1), .share0(s0), .share1(s1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] expect_byte [4];
    expect_byte = '{8'h00, 8'h7A, 8'hE5, 8'h9F};   // index {m1, m0}
    for (int t = 0; t < 50; t++) begin
      for (int m = 0; m < 4; m++) begin
        pt = {$urandom, $urandom, $urandom, $urandom};
        m0 = m[0];
        m1 = m[1];
        #1;
        checks++;
        if ((s0 ^ s1) !== pt) begin
          failures++;
          $display("FAIL unmasking pt=%h", pt);
        end
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (s1[8*i +: 8] !== expect_byte[m]) begin
            failures++;
            $display("FAIL byte %0d mask %h expected %h", i, s1[8*i +: 8], expect_byte[m]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
