// Self-checking testbench for mod_adder_eac. One instance per adder kind at the default
// 16-bit width, plus an 8-bit carry-skip instance checked for every pair of residues.
// Operands are residues below 2^N-1, drawn at random and from the corners (sums of
// exactly 2^N-1, which give the all-ones second zero code, and sums just above it, which
// raise the end-around carry). Reference: (a + b) mod (2^N-1) by integer arithmetic.
module tb_mod_adder_eac;
  import rns_pkg::*;
  localparam int N = 16;
  localparam int M = (1 << N) - 1;
  localparam adder_kind_e KINDS [5] = '{ADD_SKIP, ADD_SELECT, ADD_CLA, ADD_RCA, ADD_BK};

  logic [N-1:0] a, b;
  logic [4:0][N-1:0] s;
  logic [4:0] eac;
  logic [7:0] a8, b8, s8;
  logic eac8;
  int checks = 0, failures = 0, n_eac = 0, n_dz = 0;

  mod_adder_eac dut_default (.a(a), .b(b), .s(s[0]), .eac(eac[0]));
  for (genvar k = 1; k < 5; k++) begin : g_kind
    mod_adder_eac #(.N(N), .KIND(KINDS[k])) dut (.a(a), .b(b), .s(s[k]), .eac(eac[k]));
  end
  mod_adder_eac #(.N(8)) dut8 (.a(a8), .b(b8), .s(s8), .eac(eac8));

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

  task automatic check();
    #1;
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (canon(int'(s[k]), M) != (int'(a) + int'(b)) % M || eac[k] != (int'(a) + int'(b) > M)) begin
        failures++;
        if (failures < 10) $display("FAIL kind=%0d a=%0d b=%0d s=%0d eac=%0b", k, a, b, s[k], eac[k]);
      end
    end
    if (eac[0]) n_eac++;
    if (s[0] == N'(M)) n_dz++;
  endtask

  initial begin
    for (int v = 0; v < 20000; v++) begin
      a = N'($urandom_range(M - 1));
      case (v % 4)
        0: b = N'(M - int'(a));                       // sum exactly 2^N-1
        1: b = N'((M - int'(a) + 1) % M);             // sum 2^N (end-around carry)
        default: b = N'($urandom_range(M - 1));
      endcase
      check();
    end
    a = '0; b = '0; check();
    a = N'(M - 1); b = N'(M - 1); check();
    for (int x = 0; x < 255; x++)
      for (int y = 0; y < 255; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if (canon(int'(s8), 255) != (x + y) % 255) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 a=%0d b=%0d s=%0d", x, y, s8);
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
