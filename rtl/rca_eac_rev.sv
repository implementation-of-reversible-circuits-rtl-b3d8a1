// Modulo 2^N-1 ripple-carry adder with end-around carry, from HNG and Peres gates.
//
// Level 1 is a ripple chain of N HNG full adders adding a, b and cin. Its carry-out cn
// (weight 2^N, equal to 1 modulo 2^N-1) is the end-around carry. Level 2 is a ripple chain
// of N Peres half adders (C input 0) that adds cn to the level-1 sum, so no combinational
// loop is formed. The carry out of the half-adder row is dropped.
// Result: s == a + b + cin (mod 2^N-1) for a, b < 2^N-1; the value 2^N-1 (all ones) may
// appear as a second code for zero. Purely combinational; delay about 2N gate stages.
// The two-row structure follows the reversible RCA with EAC; the cin port and the
// dropped top half-adder carry are this design's choices.
module rca_eac_rev #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         eac
);
  logic [N:0]   c;   // level-1 ripple carries
  logic [N-1:0] t;   // level-1 sums
  logic [N:0]   h;   // level-2 ripple carries

  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_fa
    logic unused_p, unused_q;
    hng_gate u_hng (
      .a(a[i]), .b(b[i]), .c(c[i]), .d(1'b0),
      .p(unused_p), .q(unused_q), .r(t[i]), .s(c[i+1])
    );
  end

  assign eac  = c[N];
  assign h[0] = c[N];
  for (genvar i = 0; i < N; i++) begin : g_ha
    logic unused_p;
    peres_gate u_pg (
      .a(t[i]), .b(h[i]), .c(1'b0),
      .p(unused_p), .q(s[i]), .r(h[i+1])
    );
  end
  logic unused_h;
  assign unused_h = h[N];
endmodule
