// Full-size testbench: rns_adder_top exactly as delivered (N = 8, K = 4, carry-skip
// adders). It runs complete additions end to end: the worked example used in the text
// below, edge values of the dynamic range M = 255 * 4096 * 257, and random operands.
// Each sum is compared with (a + b) mod M computed by integer arithmetic.
module tb_rns_adder_full;
  localparam longint M = 64'd255 * 64'd4096 * 64'd257;

  logic [27:0] a, b, s;
  logic [7:0]  ar1, br1, sr1;
  logic [11:0] ar2, br2, sr2;
  logic [8:0]  ar3, br3, sr3;
  logic eac1, wrap2, wrap3;
  int checks = 0, failures = 0;

  rns_adder_top dut (
    .a(a), .b(b),
    .a_r1(ar1), .a_r2(ar2), .a_r3(ar3),
    .b_r1(br1), .b_r2(br2), .b_r3(br3),
    .s_r1(sr1), .s_r2(sr2), .s_r3(sr3),
    .s(s), .eac1(eac1), .wrap2(wrap2), .wrap3(wrap3)
  );

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add(input longint x, input longint y);
    longint exp;
    a = 28'(x);
    b = 28'(y);
    #1;
    exp = (x + y) % M;
    checks++;
    if (longint'(s) != exp) begin
      failures++;
      $display("FAIL a=%0d b=%0d s=%0d exp=%0d", x, y, s, exp);
    end
  endtask

  initial begin
    // 29 = (29 mod 255, 29 mod 4096, 29 mod 257) = (29, 29, 29)
    add(29, 0);
    checks++;
    if (ar1 != 8'd29 || ar2 != 12'd29 || ar3 != 9'd29) begin
      failures++;
      $display("FAIL residues of 29");
    end
    add(0, 0);
    add(M - 1, 1);
    add(M - 1, M - 1);
    add(28'hFFF_FFFF, 28'hFFF_FFFF);
    for (int v = 0; v < 10000; v++) add(longint'($urandom) & 64'hFFF_FFFF, longint'($urandom) & 64'hFFF_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
