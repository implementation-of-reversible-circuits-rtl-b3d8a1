// Carry-select adder built from HNG reversible full adders.
//
// The operands are cut into blocks of BLOCK bits. Each block holds two ripple chains of
// HNG full adders: one assumes a block carry-in of 0, the other of 1. Both run at once;
// when the real block carry-in arrives, multiplexers pick the sum bits and the carry-out
// of the matching chain, and that carry-out selects in the next block. A WIDTH that is
// not a multiple of BLOCK is padded with zero bits at the top.
// Interface: s + cout*2^WIDTH == a + b + cin. Purely combinational.
// The two chains per block and the output multiplexers follow the carry-select design.
// The 16-bit width (four blocks), chosen to match the other adders it is compared with,
// and the plain multiplexers are this design's choices.
module carry_select_rev #(
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

  logic [WP-1:0] ap, bp, s0, s1, sp;
  logic [NB:0]   bc;      // selected block carries
  logic [WP:0]   full;

  assign ap = WP'(a);
  assign bp = WP'(b);
  assign bc[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    logic [BLOCK:0] c0, c1;  // ripple carries of the carry-in-0 and carry-in-1 chains
    assign c0[0] = 1'b0;
    assign c1[0] = 1'b1;
    for (genvar j = 0; j < BLOCK; j++) begin : g_bit
      localparam int unsigned I = k * BLOCK + j;
      logic unused_p0, unused_q0, unused_p1, unused_q1;
      hng_gate u_row0 (
        .a(ap[I]), .b(bp[I]), .c(c0[j]), .d(1'b0),
        .p(unused_p0), .q(unused_q0), .r(s0[I]), .s(c0[j+1])
      );
      hng_gate u_row1 (
        .a(ap[I]), .b(bp[I]), .c(c1[j]), .d(1'b0),
        .p(unused_p1), .q(unused_q1), .r(s1[I]), .s(c1[j+1])
      );
    end
    assign sp[k*BLOCK +: BLOCK] = bc[k] ? s1[k*BLOCK +: BLOCK] : s0[k*BLOCK +: BLOCK];
    assign bc[k+1] = bc[k] ? c1[BLOCK] : c0[BLOCK];
  end

  assign full = {bc[NB], sp};
  assign s    = full[WIDTH-1:0];
  assign cout = full[WIDTH];

  logic unused;
  assign unused = ^full;
endmodule
