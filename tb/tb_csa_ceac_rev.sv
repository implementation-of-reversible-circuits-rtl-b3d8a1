// Self-checking testbench for csa_ceac_rev. A 4-bit instance is checked exhaustively and
// the 8-bit default with random operands. For each triple, sum must be the bitwise parity
// of the operands and sum + carry must be congruent to a + b + c + 1 modulo 2^N+1
// (the constant 1 is the offset a complemented end-around carry adds), by integer
// arithmetic.
module tb_csa_ceac_rev;
  logic [3:0] a4, b4, c4, s4, cy4;
  logic [7:0] a, b, c, s, cy;
  int checks = 0, failures = 0, n_top = 0;

  csa_ceac_rev #(.N(4)) dut4 (.a(a4), .b(b4), .c(c4), .sum(s4), .carry(cy4));
  csa_ceac_rev dut (.a(a), .b(b), .c(c), .sum(s), .carry(cy));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {a4, b4, c4} = 12'(v);
      #1;
      checks++;
      if (s4 !== (a4 ^ b4 ^ c4) ||
          ((int'(s4) + int'(cy4)) % 17) != ((int'(a4) + int'(b4) + int'(c4) + 1) % 17)) begin
        failures++;
        if (failures < 10) $display("FAIL N=4 a=%0d b=%0d c=%0d sum=%0d carry=%0d", a4, b4, c4, s4, cy4);
      end
      if (int'(a4[3]) + int'(b4[3]) + int'(c4[3]) >= 2) n_top++;
    end
    for (int v = 0; v < 5000; v++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      #1;
      checks++;
      if (s !== (a ^ b ^ c) ||
          ((int'(s) + int'(cy)) % 257) != ((int'(a) + int'(b) + int'(c) + 1) % 257)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d c=%0d sum=%0d carry=%0d", a, b, c, s, cy);
      end
    end
    checks++;
    if (n_top == 0) begin
      failures++;
      $display("FAIL top-bit carry never exercised");
    end
    $display("top-bit carries: %0d", n_top);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
