// Self-checking testbench for carry_select_rev. The 16-bit default and a 10-bit instance (padded to
// whole 4-bit blocks) are driven with random operands and with operands built so that
// whole blocks propagate (a_i xor b_i = 1), where a block carry-in has to pass straight
// through a block. Reference: the integer sum a + b + cin, compared with {cout, s}.
module tb_carry_select_rev;
  logic [15:0] a, b, s;
  logic        cin, cout;
  logic [9:0]  a2, b2, s2;
  logic        cin2, cout2;
  int checks = 0, failures = 0, n_through = 0;

  carry_select_rev dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  carry_select_rev #(.WIDTH(10)) dut2 (.a(a2), .b(b2), .cin(cin2), .s(s2), .cout(cout2));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16();
    #1;
    checks++;
    if ({cout, s} !== 17'(int'(a) + int'(b) + int'(cin))) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%0b s=%h cout=%0b", a, b, cin, s, cout);
    end
    // a carry-in arriving at a block whose bits all propagate
    for (int k = 1; k < 4; k++)
      if ((a[k*4 +: 4] ^ b[k*4 +: 4]) == 4'hF && (((int'(a) & ((1 << (k*4)) - 1)) + (int'(b) & ((1 << (k*4)) - 1)) + int'(cin)) >> (k*4)) != 0)
        n_through++;
  endtask

  initial begin
    for (int v = 0; v < 20000; v++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      if (v % 2 == 1) b = ~a ^ 16'($urandom & 32'h0000_000F);  // whole blocks propagate
      check16();
      a2 = 10'($urandom); b2 = 10'($urandom); cin2 = 1'($urandom);
      if (v % 3 == 0) b2 = ~a2;
      #1;
      checks++;
      if ({cout2, s2} !== 11'(int'(a2) + int'(b2) + int'(cin2))) begin
        failures++;
        if (failures < 10) $display("FAIL W=10 a=%h b=%h cin=%0b s=%h cout=%0b", a2, b2, cin2, s2, cout2);
      end
    end
    a = 16'hFFFF; b = 16'h0000; cin = 1'b1; check16();
    a = 16'hFFFF; b = 16'hFFFF; cin = 1'b1; check16();
    a = 16'h0000; b = 16'h0000; cin = 1'b0; check16();
    checks++;
    if (n_through == 0) begin
      failures++;
      $display("FAIL no carry passed through an all-propagate block");
    end
    $display("carries through all-propagate blocks: %0d", n_through);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
