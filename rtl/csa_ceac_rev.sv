// N-bit 3-to-2 carry-save adder with complemented end-around carry (CEAC), from HNG gates,
// for arithmetic modulo 2^N+1.
//
// Each bit i is one HNG gate with D = 0 acting as a full adder on a[i], b[i], c[i]; its
// sum goes to sum[i] and its carry to carry[i+1]. The carry of the top bit has weight
// 2^N = -1 (mod 2^N+1), so its complement re-enters the carry vector at bit 0:
// co*2^N = -co = (1 - co) - 1. Each CSA therefore adds a constant 1:
//   sum + carry == a + b + c + 1 (mod 2^N+1).
// Users add the matching correction constant once for a whole chain. Purely
// combinational; delay one full adder plus an inverter.
// The CSA with complemented end-around carry is named in the converter design; the
// bookkeeping of the constant 1 per CSA is worked out here.
module csa_ceac_rev #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] sum,
  output logic [N-1:0] carry
);
  logic [N-1:0] co;

  for (genvar i = 0; i < N; i++) begin : g_fa
    logic unused_p, unused_q;
    hng_gate u_hng (
      .a(a[i]), .b(b[i]), .c(c[i]), .d(1'b0),
      .p(unused_p), .q(unused_q), .r(sum[i]), .s(co[i])
    );
  end

  // complemented end-around rotation of the carry vector
  if (N > 1) begin : g_rot
    assign carry = {co[N-2:0], ~co[N-1]};
  end else begin : g_one
    assign carry = ~co;
  end
endmodule
