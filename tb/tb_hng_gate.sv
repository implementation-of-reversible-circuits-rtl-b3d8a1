// Self-checking testbench for hng_gate: all sixteen input patterns. With D = 0 the pair
// (S, R) must equal the two-bit arithmetic sum A + B + C (full adder); S flips with D.
// Also checks that the sixteen output patterns are all different (reversibility).
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit seen [16];

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int sum3;
      {a, b, c, d} = 4'(v);
      #1;
      sum3 = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== b || r !== sum3[0] || s !== (sum3[1] ^ d)) begin
        failures++;
        $display("FAIL abcd=%0b%0b%0b%0b -> %0b%0b%0b%0b", a, b, c, d, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output pattern repeated");
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
