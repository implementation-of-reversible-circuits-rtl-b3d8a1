// Modulo 2^N-1 Brent-Kung parallel-prefix adder with end-around carry.
//
// Stage 1: one Peres gate per bit (C = 0) gives propagate p_i = a_i xor b_i and generate
// g_i = a_i and b_i. Stage 2: a Brent-Kung prefix tree combines (g, p) pairs with the
// prefix operator (G, P) o (G', P') = (G | P & G', P & P'): an up-sweep of log2(N) levels
// builds the group terms at positions 2^l-1 apart, a down-sweep of log2(N)-1 levels fills
// in the remaining positions. The group generate of all N bits is the carry-out, which
// has weight 2^N = 1 (mod 2^N-1). Stage 3: one extra row of black cells folds that carry
// back in, c_i = G[i:0] | P[i:0] & cout. Stage 4: one Feynman gate per bit forms
// s_i = p_i xor c_(i-1), with c_(-1) = cout. No combinational loop is formed.
// Result: s == a + b (mod 2^N-1); a + b == 2^N-1 gives all ones, the second code of zero.
// Purely combinational; depth about 2*log2(N)+1 cell levels. Any N >= 2 is accepted.
// The tree and the extra EAC row follow the modulo Brent-Kung design; the prefix cells
// are written as plain logic, since no reversible form of them is prescribed.
module bk_mod_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         eac
);
  localparam int unsigned LEVELS = $clog2(N);

  logic [N-1:0] p, g;     // bit propagate / generate
  logic [N-1:0] gp, pp;   // prefix G[i:0], P[i:0]
  logic [N-1:0] c;        // carries after the end-around row

  for (genvar i = 0; i < N; i++) begin : g_pg
    logic unused_p;
    peres_gate u_pg (.a(a[i]), .b(b[i]), .c(1'b0), .p(unused_p), .q(p[i]), .r(g[i]));
  end

  // Brent-Kung tree, computed in place: a node is only combined with a node that is
  // already final at that level.
  always_comb begin
    logic [N-1:0] tg, tp;
    tg = g;
    tp = p;
    // up-sweep: node i (i+1 a multiple of 2^(l+1)) takes node i-2^l
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < N; i++) begin
        if (((i + 1) % (2 ** (l + 1))) == 0) begin
          tg[i] = tg[i] | (tp[i] & tg[i - 2 ** l]);
          tp[i] = tp[i] & tp[i - 2 ** l];
        end
      end
    end
    // down-sweep: node i = j*2^(l+1) + 2^l - 1 (j >= 1) takes node i-2^l
    for (int l = LEVELS - 2; l >= 0; l--) begin
      for (int i = 0; i < N; i++) begin
        if ((((i + 1) % (2 ** (l + 1))) == (2 ** l)) && (i >= 2 ** (l + 1))) begin
          tg[i] = tg[i] | (tp[i] & tg[i - 2 ** l]);
          tp[i] = tp[i] & tp[i - 2 ** l];
        end
      end
    end
    gp = tg;
    pp = tp;
  end

  assign eac = gp[N-1];

  // extra row of black cells: the end-around carry enters every prefix
  assign c = gp | (pp & {N{eac}});

  for (genvar i = 0; i < N; i++) begin : g_sum
    logic unused_p;
    if (i == 0) begin : g_lsb
      feynman_gate u_fg (.a(p[0]), .b(eac), .p(unused_p), .q(s[0]));
    end else begin : g_bit
      feynman_gate u_fg (.a(p[i]), .b(c[i-1]), .p(unused_p), .q(s[i]));
    end
  end
  logic unused_c;
  assign unused_c = c[N-1];
endmodule
