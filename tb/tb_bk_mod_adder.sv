// Self-checking testbench for bk_mod_adder. The 8-bit default is checked for every pair
// a, b in [0, 254]; instances of 5 and 16 bits (not a power of two, and a deeper tree)
// with random operands. Reference: (a + b) mod (2^N-1) by integer arithmetic, all-ones
// output read as zero; the end-around carry must equal the carry out of a + b.
module tb_bk_mod_adder;
  logic [7:0]  a, b, s;
  logic        eac;
  logic [4:0]  a5, b5, s5;
  logic        eac5;
  logic [15:0] a16, b16, s16;
  logic        eac16;
  int checks = 0, failures = 0, n_eac = 0;

  bk_mod_adder dut (.a(a), .b(b), .s(s), .eac(eac));
  bk_mod_adder #(.N(5))  dut5  (.a(a5),  .b(b5),  .s(s5),  .eac(eac5));
  bk_mod_adder #(.N(16)) dut16 (.a(a16), .b(b16), .s(s16), .eac(eac16));

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
    for (int x = 0; x < 255; x++)
      for (int y = 0; y < 255; y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        checks++;
        if (canon(int'(s), 255) != (x + y) % 255 || eac != (x + y >= 256)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d s=%0d eac=%0b", x, y, s, eac);
        end
        if (eac) n_eac++;
      end
    for (int v = 0; v < 3000; v++) begin
      a5 = 5'($urandom_range(30)); b5 = 5'($urandom_range(30));
      a16 = 16'($urandom_range(65534)); b16 = 16'($urandom_range(65534));
      #1;
      checks++;
      if (canon(int'(s5), 31) != (int'(a5) + int'(b5)) % 31) begin
        failures++;
        $display("FAIL N=5 a=%0d b=%0d s=%0d", a5, b5, s5);
      end
      checks++;
      if (canon(int'(s16), 65535) != (int'(a16) + int'(b16)) % 65535) begin
        failures++;
        $display("FAIL N=16 a=%0d b=%0d s=%0d", a16, b16, s16);
      end
    end
    checks++;
    if (n_eac == 0) begin
      failures++;
      $display("FAIL end-around carry never seen");
    end
    $display("end-around carries: %0d", n_eac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
