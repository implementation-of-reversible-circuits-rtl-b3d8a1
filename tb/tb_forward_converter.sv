// Self-checking testbench for forward_converter. The default (N = 8, K = 4, 28-bit input,
// carry-skip adder) and two small instances (N = 4, K = 4 with four chunks; N = 3, K = 1)
// are driven with random inputs and with corner values (0, all ones, multiples of the
// moduli, and inputs whose 2^N-1 channel sums to a multiple of 2^N-1). Reference: the
// remainders x mod (2^N-1), x mod 2^(N+K), x mod (2^N+1) computed with the % operator.
module tb_forward_converter;
  import rns_pkg::*;
  logic [27:0] x;
  logic [7:0]  x1;
  logic [11:0] x2;
  logic [8:0]  x3;
  logic [15:0] y;
  logic [3:0]  y1;
  logic [7:0]  y2;
  logic [4:0]  y3;
  logic [9:0]  z;
  logic [2:0]  z1;
  logic [3:0]  z2;
  logic [3:0]  z3;
  int checks = 0, failures = 0;

  forward_converter dut (.x(x), .x1(x1), .x2(x2), .x3(x3));
  forward_converter #(.N(4), .K(4), .KIND(ADD_CLA)) dut_b (.x(y), .x1(y1), .x2(y2), .x3(y3));
  forward_converter #(.N(3), .K(1), .KIND(ADD_BK))  dut_c (.x(z), .x1(z1), .x2(z2), .x3(z3));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_main();
    #1;
    checks++;
    if (longint'(x1) != longint'(x) % 255 || longint'(x2) != longint'(x) % 4096 ||
        longint'(x3) != longint'(x) % 257) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d -> %0d %0d %0d", x, x1, x2, x3);
    end
  endtask

  initial begin
    x = '0;           check_main();
    x = '1;           check_main();
    x = 28'(255 * 4096 * 257 - 1); check_main();
    x = 28'(255 * 1000); check_main();
    x = 28'(257 * 999);  check_main();
    for (int v = 0; v < 20000; v++) begin
      x = 28'($urandom);
      if (v % 5 == 0) x = 28'(255 * $urandom_range(1052000));
      check_main();
    end
    for (int v = 0; v < 65536; v++) begin
      y = 16'(v);
      #1;
      checks++;
      if (int'(y1) != v % 15 || int'(y2) != v % 256 || int'(y3) != v % 17) begin
        failures++;
        if (failures < 10) $display("FAIL N=4 x=%0d -> %0d %0d %0d", v, y1, y2, y3);
      end
    end
    for (int v = 0; v < 1024; v++) begin
      z = 10'(v);
      #1;
      checks++;
      if (int'(z1) != v % 7 || int'(z2) != v % 16 || int'(z3) != v % 9) begin
        failures++;
        if (failures < 10) $display("FAIL N=3 x=%0d -> %0d %0d %0d", v, z1, z2, z3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
