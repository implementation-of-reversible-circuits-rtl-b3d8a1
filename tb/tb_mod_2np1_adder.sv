// Self-checking testbench for mod_2np1_adder: the 8-bit default (modulus 257) for every
// pair of residues in [0, 256], and a 3-bit instance (modulus 9) likewise. Reference:
// (a + b) mod (2^N+1) by integer arithmetic; wrap must be set exactly when a + b >= 2^N+1.
module tb_mod_2np1_adder;
  logic [8:0] a, b, s;
  logic       wrap;
  logic [3:0] a3, b3, s3;
  logic       wrap3;
  int checks = 0, failures = 0, n_wrap = 0;

  mod_2np1_adder dut (.a(a), .b(b), .s(s), .wrap(wrap));
  mod_2np1_adder #(.N(3)) dut3 (.a(a3), .b(b3), .s(s3), .wrap(wrap3));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x <= 256; x++)
      for (int y = 0; y <= 256; y++) begin
        a = 9'(x); b = 9'(y);
        #1;
        checks++;
        if (int'(s) != (x + y) % 257 || wrap != (x + y >= 257)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d s=%0d wrap=%0b", x, y, s, wrap);
        end
        if (wrap) n_wrap++;
      end
    for (int x = 0; x <= 8; x++)
      for (int y = 0; y <= 8; y++) begin
        a3 = 4'(x); b3 = 4'(y);
        #1;
        checks++;
        if (int'(s3) != (x + y) % 9 || wrap3 != (x + y >= 9)) begin
          failures++;
          $display("FAIL N=3 a=%0d b=%0d s=%0d wrap=%0b", x, y, s3, wrap3);
        end
      end
    $display("modulus subtractions: %0d", n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
