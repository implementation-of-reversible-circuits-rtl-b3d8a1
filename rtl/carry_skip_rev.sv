// Carry-skip adder built from HNG reversible full adders.
//
// The operands are cut into blocks of BLOCK bits (four 4-bit blocks by default). Inside a
// block the bits ripple through HNG gates (D = 0). Feynman gates form the propagate bits
// a_i xor b_i; when all propagate bits of a block are 1 the block's carry-out equals its
// carry-in, so the skip logic is cout_blk = ripple_cout | (&p_blk & cin_blk) and the carry
// can bypass the block. A WIDTH that is not a multiple of BLOCK is padded with zero bits
// at the top. Interface: s + cout*2^WIDTH == a + b + cin. Purely combinational.
// The ripple blocks, the AND/OR skip logic and the 16-bit, 4-block default follow the
// carry-skip design; forming the propagate bits with Feynman gates is this design's choice.
module carry_skip_rev #(
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

  logic [WP-1:0] ap, bp, sp, pr;
  logic [NB-1:0] rco;    // ripple carry out of each block
  logic [NB:0]   bc;     // block carries after the skip logic
  logic [WP:0]   full;

  assign ap = WP'(a);
  assign bp = WP'(b);
  assign bc[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    logic [BLOCK:0] rc;  // ripple carries inside the block
    assign rc[0]  = bc[k];
    assign rco[k] = rc[BLOCK];
    for (genvar j = 0; j < BLOCK; j++) begin : g_bit
      localparam int unsigned I = k * BLOCK + j;
      logic unused_p, unused_q, unused_fp;
      hng_gate u_hng (
        .a(ap[I]), .b(bp[I]), .c(rc[j]), .d(1'b0),
        .p(unused_p), .q(unused_q), .r(sp[I]), .s(rc[j+1])
      );
      feynman_gate u_fg (.a(ap[I]), .b(bp[I]), .p(unused_fp), .q(pr[I]));
    end
    // skip logic: AND of the block propagates with the block carry-in, OR the ripple carry
    assign bc[k+1] = rco[k] | ((&pr[k*BLOCK +: BLOCK]) & bc[k]);
  end

  assign full = {bc[NB], sp};
  assign s    = full[WIDTH-1:0];
  assign cout = full[WIDTH];

  logic unused;
  assign unused = ^full;
endmodule
