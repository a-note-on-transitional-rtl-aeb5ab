// tb_secure_and_array: self-checking testbench of the array of identical secure AND gates.
//
// Streams 500 cycles of random operand shares with a random valid pattern into the default
// 31-instance array. Four cycles after each input, out_valid must equal the input's valid and
// every instance must return q1 = a1 and q0 ^ q1 = a & b. Also checks that reset clears
// out_valid and all output shares.
module tb_secure_and_array;
  import masked_and_pkg::*;

  localparam int N = 31;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid, out_valid;
  share_t       a, b;
  logic [N-1:0] q0, q1;
  int           checks = 0;
  int           failures = 0;

  secure_and_array dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
                        .out_valid(out_valid), .q0(q0), .q1(q1));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    share_t qa[$], qb[$];
    logic   qv[$];
    rst_n = 1'b0; in_valid = 1'b1; a = share_t'(2'b11); b = share_t'(2'b11);
    repeat (3) @(negedge clk);
    checks++;
    if (out_valid !== 1'b0 || q0 !== '0 || q1 !== '0) begin
      failures++;
      $display("FAIL reset state");
    end
    rst_n = 1'b1;
    for (int k = 0; k < 504; k++) begin
      if (k >= GATE_LATENCY) begin
        share_t ea, eb;
        logic   ev, prod;
        ea = qa.pop_front(); eb = qb.pop_front(); ev = qv.pop_front();
        prod = (ea.s0 ^ ea.s1) & (eb.s0 ^ eb.s1);
        checks++;
        if (out_valid !== ev) begin
          failures++;
          $display("FAIL valid k=%0d", k);
        end
        checks++;
        if ((q0 ^ q1) !== {N{prod}} || q1 !== {N{ea.s1}}) begin
          failures++;
          if (failures < 10) $display("FAIL data k=%0d q0=%h q1=%h", k, q0, q1);
        end
      end
      in_valid = 1'($urandom_range(0, 1));
      a = share_t'($urandom_range(0, 3));
      b = share_t'($urandom_range(0, 3));
      qa.push_back(a); qb.push_back(b); qv.push_back(in_valid);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
