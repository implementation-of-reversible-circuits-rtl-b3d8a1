// Residue-to-binary (reverse) converter for the moduli set {2^N-1, 2^(N+K), 2^N+1}.
//
// The low N+K bits of X are x2 itself. The upper 2N bits are Y = (X - x2) / 2^(N+K), a
// number below 2^2N-1, computed modulo 2^2N-1 from the Chinese remainder theorem for the
// pair {2^N-1, 2^N+1}:
//   X = x3 + (2^(2N-1) + 2^(N-1)) * (x1 - x3)      (mod 2^2N-1)
//   Y = 2^-(N+K) * (X - x2)                         (mod 2^2N-1)
// Modulo 2^2N-1 a product by a power of two is a bit rotation and a negation is a bitwise
// complement, so operand preparation is wiring only and yields five 2N-bit operands:
// x3, x1*(2^(2N-1) + 2^(N-1)) (two non-overlapping copies of x1), the complements of
// x3*2^(2N-1) and x3*2^(N-1), and the complement of x2, each then rotated by -(N+K).
// A chain of three 2N-bit CSAs with end-around carry and one modulo 2^2N-1 adder (type
// KIND) sum them; an all-ones result is the second code of zero and is mapped to 0.
// Output x = {Y, x2}. Accepts x1 = 2^N-1 as a code for zero. Purely combinational.
// Requires 1 <= K <= N.
// The structure (operand preparation, CSAs with EAC, modulo 2^2N-1 adder, X = Y & x2)
// follows the converter design. The operand equations are derived here, which gives five
// operands and three CSAs where the design draws four operands and two CSAs.
module reverse_converter
  import rns_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 4,
  parameter adder_kind_e KIND = ADD_SKIP
) (
  input  logic [N-1:0]     x1,
  input  logic [N+K-1:0]   x2,
  input  logic [N:0]       x3,
  output logic [3*N+K-1:0] x
);
  localparam int unsigned W  = 2 * N;
  localparam int unsigned RL = (W - ((N + K) % W)) % W;  // left rotation for 2^-(N+K)

  function automatic logic [W-1:0] rotl(input logic [W-1:0] v, input int unsigned r);
    logic [W-1:0] o;
    for (int i = 0; i < W; i++) o[(i + r) % W] = v[i];
    return o;
  endfunction

  logic [W-1:0] x1w, x2w, x3w;
  logic [4:0][W-1:0] op;
  logic [W-1:0] vs, vc, y;
  logic unused_eac;

  assign x1w = W'(x1);
  assign x2w = W'(x2);
  assign x3w = W'(x3);

  // operand preparation
  assign op[0] = rotl(x3w, RL);
  assign op[1] = rotl(rotl(x1w, W - 1) | rotl(x1w, N - 1), RL);
  assign op[2] = rotl(~rotl(x3w, W - 1), RL);
  assign op[3] = rotl(~rotl(x3w, N - 1), RL);
  assign op[4] = rotl(~x2w, RL);

  csa_eac_chain #(.W(W), .NT(5)) u_chain (.t(op), .sum(vs), .carry(vc));
  mod_adder_eac #(.N(W), .KIND(KIND)) u_madd (.a(vs), .b(vc), .s(y), .eac(unused_eac));

  assign x = {((&y) ? '0 : y), x2};
endmodule
