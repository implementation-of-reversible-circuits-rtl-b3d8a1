// Carry-lookahead adder built from Peres and Feynman reversible gates.
//
// A Peres gate per bit (C = 0) gives propagate p_i = a_i xor b_i and generate
// g_i = a_i and b_i. Within each BLOCK-bit group the lookahead logic computes every carry
// directly from the group carry-in as a sum of products,
//   c_j = g_(j-1) | p_(j-1) g_(j-2) | ... | p_(j-1)...p_0 c_0,
// so no carry waits for the one below it. A Feynman gate per bit forms s_i = p_i xor c_i.
// Group carries ripple from one group to the next. A WIDTH that is not a multiple of
// BLOCK is padded with zero bits at the top.
// Interface: s + cout*2^WIDTH == a + b + cin. Purely combinational.
// The 4-bit lookahead group follows the carry-lookahead design; the choice of Peres and
// Feynman gates, the rippled group carries and the 16-bit default width are this
// design's own.
module cla_rev #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int unsigned NB = (WIDTH + BLOCK - 1) / BLOCK;
  localparam int unsigned WP = NB * BLOCK;

  logic [WP-1:0] ap, bp, p, g, sp;
  logic [WP:0]   c;      // c[k*BLOCK] are group carries, the rest lookahead carries
  logic [WP:0]   full;

  assign ap = WP'(a);
  assign bp = WP'(b);
  assign c[0] = cin;

  for (genvar i = 0; i < WP; i++) begin : g_bit
    logic unused_pp, unused_fp;
    peres_gate   u_pg (.a(ap[i]), .b(bp[i]), .c(1'b0), .p(unused_pp), .q(p[i]), .r(g[i]));
    feynman_gate u_fg (.a(p[i]), .b(c[i]), .p(unused_fp), .q(sp[i]));
  end

  for (genvar k = 0; k < NB; k++) begin : g_grp
    localparam int unsigned B0 = k * BLOCK;
    // lookahead: carry into bit B0+j for j = 1..BLOCK
    for (genvar j = 1; j <= BLOCK; j++) begin : g_la
      logic cj;
      always_comb begin
        logic term;
        logic acc;
        acc  = 1'b0;
        // generate at bit B0+m, propagated through bits B0+m+1 .. B0+j-1
        for (int m = 0; m < j; m++) begin
          term = g[B0 + m];
          for (int q = m + 1; q < j; q++) term = term & p[B0 + q];
          acc = acc | term;
        end
        // group carry-in propagated through bits B0 .. B0+j-1
        term = c[B0];
        for (int q = 0; q < j; q++) term = term & p[B0 + q];
        cj = acc | term;
      end
      assign c[B0 + j] = cj;
    end
  end

  assign full = {c[WP], sp};
  assign s    = full[WIDTH-1:0];
  assign cout = full[WIDTH];

  logic unused;
  assign unused = ^full;
endmodule
