// Chain of carry-save adders with end-around carry: NT operands of W bits to two.
//
// The first CSA compresses operands 0, 1 and 2; every further CSA adds the next operand
// to the running sum and carry vectors, as in the converter datapaths. With CEAC = 0 the
// CSAs wrap the carry plainly (modulo 2^W-1) and after NT-2 CSAs
// sum + carry == t[0] + ... + t[NT-1] (mod 2^W-1). With CEAC = 1 they wrap it complemented
// (modulo 2^W+1) and sum + carry == t[0] + ... + t[NT-1] + (NT-2) (mod 2^W+1).
// Purely combinational; delay NT-2 full adders. Requires NT >= 3.
module csa_eac_chain #(
  parameter int unsigned W  = 8,
  parameter int unsigned NT = 4,
  parameter bit          CEAC = 1'b0
) (
  input  logic [NT-1:0][W-1:0] t,
  output logic [W-1:0]         sum,
  output logic [W-1:0]         carry
);
  logic [NT-3:0][W-1:0] ss, cc;

  for (genvar i = 0; i < NT - 2; i++) begin : g_csa
    logic [W-1:0] x, y;
    if (i == 0) begin : g_first
      assign x = t[0];
      assign y = t[1];
    end else begin : g_next
      assign x = ss[i-1];
      assign y = cc[i-1];
    end
    if (CEAC) begin : g_ceac
      csa_ceac_rev #(.N(W)) u_csa (.a(x), .b(y), .c(t[i+2]), .sum(ss[i]), .carry(cc[i]));
    end else begin : g_eac
      csa_eac_rev #(.N(W)) u_csa (.a(x), .b(y), .c(t[i+2]), .sum(ss[i]), .carry(cc[i]));
    end
  end

  assign sum   = ss[NT-3];
  assign carry = cc[NT-3];
endmodule
