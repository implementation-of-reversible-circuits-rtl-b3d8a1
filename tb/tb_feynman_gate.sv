// Self-checking testbench for feynman_gate: all four input patterns, expected outputs
// from the gate's truth table (copy of A, parity of A and B), plus a check that applying
// the gate twice restores the inputs (reversibility).
module tb_feynman_gate;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== ((a + b) % 2 == 1)) begin
        failures++;
        $display("FAIL a=%0b b=%0b p=%0b q=%0b", a, b, p, q);
      end
      checks++;
      if ({p2, q2} !== {a, b}) begin
        failures++;
        $display("FAIL inverse a=%0b b=%0b", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
