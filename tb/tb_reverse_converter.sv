// Self-checking testbench for reverse_converter. For the default (N = 8, K = 4) and two
// small instances (N = 4, K = 4; N = 3, K = 1) a number X below the dynamic range M is
// chosen, its residues are computed in the testbench with the % operator and fed to the
// converter, which must return X. Includes X = 0, X = M-1, and residue x1 = 2^N-1 (the
// second code of zero), which must give the same X as x1 = 0.
module tb_reverse_converter;
  import rns_pkg::*;
  localparam longint M8 = 64'd255 * 64'd4096 * 64'd257;
  logic [7:0]  x1;
  logic [11:0] x2;
  logic [8:0]  x3;
  logic [27:0] x;
  logic [3:0]  y1;
  logic [7:0]  y2;
  logic [4:0]  y3;
  logic [15:0] y;
  logic [2:0]  z1;
  logic [3:0]  z2;
  logic [3:0]  z3;
  logic [9:0]  z;
  int checks = 0, failures = 0;

  reverse_converter dut (.x1(x1), .x2(x2), .x3(x3), .x(x));
  reverse_converter #(.N(4), .K(4), .KIND(ADD_SELECT)) dut_b (.x1(y1), .x2(y2), .x3(y3), .x(y));
  reverse_converter #(.N(3), .K(1), .KIND(ADD_RCA))    dut_c (.x1(z1), .x2(z2), .x3(z3), .x(z));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_main(input longint v, input bit alt_zero);
    x1 = 8'(v % 255);
    if (alt_zero && x1 == 0) x1 = 8'hFF;
    x2 = 12'(v % 4096);
    x3 = 9'(v % 257);
    #1;
    checks++;
    if (longint'(x) != v) begin
      failures++;
      if (failures < 10) $display("FAIL X=%0d residues %0d %0d %0d -> %0d", v, x1, x2, x3, x);
    end
  endtask

  initial begin
    check_main(0, 0);
    check_main(0, 1);
    check_main(M8 - 1, 0);
    check_main(255 * 12345, 1);
    for (int v = 0; v < 20000; v++) begin
      longint r;
      r = longint'({$urandom, $urandom}) & 64'h0FFF_FFFF_FFFF;
      check_main(r % M8, v % 7 == 0);
    end
    for (int v = 0; v < 15 * 256 * 17; v++) begin
      y1 = 4'(v % 15); y2 = 8'(v % 256); y3 = 5'(v % 17);
      #1;
      checks++;
      if (int'(y) != v) begin
        failures++;
        if (failures < 10) $display("FAIL N=4 X=%0d -> %0d", v, y);
      end
    end
    for (int v = 0; v < 7 * 16 * 9; v++) begin
      z1 = 3'(v % 7); z2 = 4'(v % 16); z3 = 4'(v % 9);
      if (z1 == 0 && v % 2 == 1) z1 = 3'd7;
      #1;
      checks++;
      if (int'(z) != v) begin
        failures++;
        if (failures < 10) $display("FAIL N=3 X=%0d -> %0d", v, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
