// Self-checking testbench for peres_gate: all eight input patterns. Expected values are
// worked out arithmetically: with C = 0 the pair (R, Q) is the two-bit sum A + B; in
// general R flips with C. Also checks that the eight outputs are all different
// (the gate is a permutation, i.e. reversible).
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit seen [8];

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int sum2;
      {a, b, c} = 3'(v);
      #1;
      sum2 = int'(a) + int'(b);
      checks++;
      if (p !== a || q !== sum2[0] || r !== (sum2[1] ^ c)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> %0b%0b%0b", a, b, c, p, q, r);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output pattern repeated");
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
