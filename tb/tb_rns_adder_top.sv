// End-to-end testbench for rns_adder_top. Five copies of the design at the default size
// (N = 8, K = 4), one per adder kind, and one small copy (N = 4, K = 2, carry-skip) add
// the same kind of random operand pairs. Each result is compared with (a + b) mod M from
// integer arithmetic, and the residues of the operands and of the sum with % references.
// Operands are steered so that every mechanism occurs: the end-around carry of the
// 2^N-1 channel, a channel-1 sum of exactly 2^N-1 (all-ones code mapped to zero), the
// dropped carry of the 2^(N+K) channel, the modulus subtraction of the 2^N+1 channel and
// a sum beyond the dynamic range M (modular wrap-around). A mechanism that never occurs
// counts as a failure.
module tb_rns_adder_top;
  import rns_pkg::*;
  localparam longint M  = 64'd255 * 64'd4096 * 64'd257;
  localparam longint MS = 64'd15 * 64'd64 * 64'd17;
  localparam adder_kind_e KINDS [5] = '{ADD_SKIP, ADD_SELECT, ADD_CLA, ADD_RCA, ADD_BK};

  logic [27:0] a, b;
  logic [4:0][27:0] s;
  logic [4:0][7:0]  sr1, ar1, br1;
  logic [4:0][11:0] sr2, ar2, br2;
  logic [4:0][8:0]  sr3, ar3, br3;
  logic [4:0] eac1, wrap2, wrap3;

  logic [13:0] as, bs, ss;
  logic [3:0]  as1, bs1, ss1;
  logic [5:0]  as2, bs2, ss2;
  logic [4:0]  as3, bs3, ss3;
  logic        eacs, wrap2s, wrap3s;

  int checks = 0, failures = 0;
  int n_eac = 0, n_dz = 0, n_wrap2 = 0, n_wrap3 = 0, n_ovf = 0;

  for (genvar k = 0; k < 5; k++) begin : g_kind
    rns_adder_top #(.N(8), .K(4), .KIND(KINDS[k])) dut (
      .a(a), .b(b),
      .a_r1(ar1[k]), .a_r2(ar2[k]), .a_r3(ar3[k]),
      .b_r1(br1[k]), .b_r2(br2[k]), .b_r3(br3[k]),
      .s_r1(sr1[k]), .s_r2(sr2[k]), .s_r3(sr3[k]),
      .s(s[k]), .eac1(eac1[k]), .wrap2(wrap2[k]), .wrap3(wrap3[k])
    );
  end

  rns_adder_top #(.N(4), .K(2)) dut_small (
    .a(as), .b(bs),
    .a_r1(as1), .a_r2(as2), .a_r3(as3),
    .b_r1(bs1), .b_r2(bs2), .b_r3(bs3),
    .s_r1(ss1), .s_r2(ss2), .s_r3(ss3),
    .s(ss), .eac1(eacs), .wrap2(wrap2s), .wrap3(wrap3s)
  );

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_main();
    longint la, lb, exp;
    #1;
    la = longint'(a);
    lb = longint'(b);
    exp = (la + lb) % M;
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (longint'(s[k]) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL kind=%0d a=%0d b=%0d s=%0d exp=%0d", k, a, b, s[k], exp);
      end
      checks++;
      if (longint'(ar1[k]) != la % 255 || longint'(br3[k]) != lb % 257 ||
          longint'(sr1[k]) != (la + lb) % 255 || longint'(sr2[k]) != (la + lb) % 4096 ||
          longint'(sr3[k]) != (la + lb) % 257) begin
        failures++;
        if (failures < 10) $display("FAIL residues kind=%0d a=%0d b=%0d", k, a, b);
      end
    end
    if (eac1[0]) n_eac++;
    if (int'(ar1[0]) + int'(br1[0]) == 255) n_dz++;
    if (wrap2[0]) n_wrap2++;
    if (wrap3[0]) n_wrap3++;
    if (la % M + lb % M >= M) n_ovf++;
  endtask

  initial begin
    for (int v = 0; v < 5000; v++) begin
      a = 28'($urandom);
      b = 28'($urandom);
      if (v % 10 == 1) b = 28'(255 * $urandom_range(1000) + (255 - longint'(a) % 255));  // channel 1 sums to 255
      if (v % 10 == 2) b = 28'(M - 1 - longint'(a) % M);                                  // a + b = M-1
      if (v % 10 == 3) b = 28'(M - longint'(a) % M);                                      // a + b = M, result 0
      check_main();
    end
    for (int v = 0; v < 3000; v++) begin
      longint exp;
      as = 14'($urandom); bs = 14'($urandom);
      #1;
      exp = (longint'(as) + longint'(bs)) % MS;
      checks++;
      if (longint'(ss) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL small a=%0d b=%0d s=%0d exp=%0d", as, bs, ss, exp);
      end
    end
    $display("end-around carries %0d, channel-1 zero codes %0d, channel-2 carries %0d, channel-3 subtractions %0d, range wrap-arounds %0d",
             n_eac, n_dz, n_wrap2, n_wrap3, n_ovf);
    checks++;
    if (n_eac == 0 || n_dz == 0 || n_wrap2 == 0 || n_wrap3 == 0 || n_ovf == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
