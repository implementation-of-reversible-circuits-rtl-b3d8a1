// N-bit 3-to-2 carry-save adder with end-around carry (EAC), built from HNG gates.
//
// Each bit i is one HNG gate with D = 0 acting as a full adder on a[i], b[i], c[i].
// Its sum goes to sum[i]; its carry has weight 2^(i+1) and goes to carry[i+1]. The carry
// of the top bit has weight 2^N, which equals 1 modulo 2^N-1, so it re-enters the carry
// vector at bit 0. Hence sum + carry == a + b + c (mod 2^N-1). The delay is one full
// adder, independent of N. Purely combinational.
// The gate-level structure follows the reversible CSA with EAC; the bit ordering of the
// ports (bit 0 least significant) is this design's convention.
module csa_eac_rev #(
  parameter int unsigned N = 4
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

  // End-around rotation of the carry vector.
  if (N > 1) begin : g_rot
    assign carry = {co[N-2:0], co[N-1]};
  end else begin : g_one
    assign carry = co;
  end
endmodule
