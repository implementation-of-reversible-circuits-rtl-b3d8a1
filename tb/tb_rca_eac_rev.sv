// Self-checking testbench for rca_eac_rev. The 4-bit default is checked for every
// a, b in [0, 14] and both carry-ins; a 9-bit instance with random operands. Reference:
// (a + b + cin) mod (2^N-1) by integer arithmetic, with the adder's all-ones output read
// as zero; the end-around carry must equal the carry out of a + b + cin.
module tb_rca_eac_rev;
  localparam int N2 = 9;
  logic [3:0]    a, b, s;
  logic          cin, eac;
  logic [N2-1:0] a2, b2, s2;
  logic          cin2, eac2;
  int checks = 0, failures = 0, n_eac = 0, n_dz = 0;

  rca_eac_rev dut (.a(a), .b(b), .cin(cin), .s(s), .eac(eac));
  rca_eac_rev #(.N(N2)) dut2 (.a(a2), .b(b2), .cin(cin2), .s(s2), .eac(eac2));

  function automatic int canon(int v, int m);
    return (v == m) ? 0 : v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 15; x++)
      for (int y = 0; y < 15; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a = 4'(x); b = 4'(y); cin = 1'(ci);
          #1;
          checks++;
          if (canon(int'(s), 15) != (x + y + ci) % 15 || eac != (x + y + ci >= 16)) begin
            failures++;
            $display("FAIL a=%0d b=%0d cin=%0d s=%0d eac=%0b", x, y, ci, s, eac);
          end
          if (eac) n_eac++;
          if (s == 4'hF) n_dz++;
        end
    for (int v = 0; v < 3000; v++) begin
      int m2;
      m2 = (1 << N2) - 1;
      a2 = N2'($urandom_range(m2 - 1)); b2 = N2'($urandom_range(m2 - 1)); cin2 = 1'($urandom);
      #1;
      checks++;
      if (canon(int'(s2), m2) != (int'(a2) + int'(b2) + int'(cin2)) % m2) begin
        failures++;
        $display("FAIL N=%0d a=%0d b=%0d cin=%0b s=%0d", N2, a2, b2, cin2, s2);
      end
    end
    checks++;
    if (n_eac == 0 || n_dz == 0) begin
      failures++;
      $display("FAIL end-around carry or second zero code never seen");
    end
    $display("end-around carries: %0d, all-ones zero results: %0d", n_eac, n_dz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
