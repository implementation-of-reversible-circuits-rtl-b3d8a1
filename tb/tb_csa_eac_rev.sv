// Self-checking testbench for csa_eac_rev. The 4-bit default is checked exhaustively
// (4096 operand triples) and a 13-bit instance with random operands. For each triple:
// sum must be the bitwise parity of the operands, and sum + carry must be congruent to
// a + b + c modulo 2^N-1 (reference computed with integer arithmetic).
module tb_csa_eac_rev;
  localparam int N2 = 13;
  logic [3:0]  a, b, c, s, cy;
  logic [N2-1:0] a2, b2, c2, s2, cy2;
  int checks = 0, failures = 0;
  int top_carries = 0;

  csa_eac_rev dut (.a(a), .b(b), .c(c), .sum(s), .carry(cy));
  csa_eac_rev #(.N(N2)) dut2 (.a(a2), .b(b2), .c(c2), .sum(s2), .carry(cy2));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {a, b, c} = 12'(v);
      #1;
      checks++;
      if (s !== (a ^ b ^ c) ||
          ((int'(s) + int'(cy)) % 15) != ((int'(a) + int'(b) + int'(c)) % 15)) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d sum=%0d carry=%0d", a, b, c, s, cy);
      end
      if (int'(a[3]) + int'(b[3]) + int'(c[3]) >= 2) top_carries++;
    end
    for (int v = 0; v < 3000; v++) begin
      a2 = N2'($urandom); b2 = N2'($urandom); c2 = N2'($urandom);
      #1;
      checks++;
      if (s2 !== (a2 ^ b2 ^ c2) ||
          ((longint'(s2) + longint'(cy2)) % ((1 << N2) - 1)) !=
          ((longint'(a2) + longint'(b2) + longint'(c2)) % ((1 << N2) - 1))) begin
        failures++;
        $display("FAIL N=%0d a=%0d b=%0d c=%0d", N2, a2, b2, c2);
      end
    end
    checks++;
    if (top_carries == 0) begin
      failures++;
      $display("FAIL end-around carry never exercised");
    end
    $display("end-around carries exercised: %0d", top_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
