// Binary-to-residue (forward) converter for the moduli set {2^N-1, 2^(N+K), 2^N+1}.
//
// The input x has 3N+K bits; the dynamic range is M = (2^N-1) * 2^(N+K) * (2^N+1).
//  - x2 = x mod 2^(N+K) is simply the low N+K bits of x.
//  - x1 = x mod 2^N-1: since 2^N = 1 (mod 2^N-1), x is congruent to the sum of its N-bit
//    chunks (operand preparation: cut x into ceil((3N+K)/N) chunks, the last one zero
//    padded). A chain of N-bit CSAs with end-around carry reduces the chunks to two
//    vectors and the modulo 2^N-1 adder (adder type KIND) adds them. An all-ones result
//    is mapped to 0 so that x1 is always below 2^N-1.
//  - x3 = x mod 2^N+1: since 2^N = -1 (mod 2^N+1), x is congruent to the alternating sum
//    c0 - c1 + c2 - c3 of its chunks. A negative chunk is entered as its N-bit complement,
//    because -c = ~c + 2 (mod 2^N+1). A chain of CSAs with complemented end-around carry
//    (each adds 1) reduces the chunks plus one correction constant CORR to two vectors,
//    and the modulo 2^N+1 adder adds them. CORR = 2*(negated chunks) - (CSAs), reduced
//    modulo 2^N+1; for four chunks it is 1.
// Purely combinational. Requires 1 <= K <= N.
// The channel split, the CSA-with-EAC chain for 2^N-1 and the CSA-with-CEAC chain for
// 2^N+1 (five operands, three CSAs) follow the converter design. The correction constant
// is worked out here. The defaults N = 8, K = 4 are this design's choice.
module forward_converter
  import rns_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 4,
  parameter adder_kind_e KIND = ADD_SKIP
) (
  input  logic [3*N+K-1:0] x,
  output logic [N-1:0]     x1,
  output logic [N+K-1:0]   x2,
  output logic [N:0]       x3
);
  localparam int unsigned XW  = 3 * N + K;
  localparam int unsigned NCH = (XW + N - 1) / N;

  // channel 2^(N+K)
  assign x2 = x[N+K-1:0];

  // channel 2^N-1
  logic [NCH*N-1:0]         xp;
  logic [NCH-1:0][N-1:0]    chunk;
  logic [N-1:0]             vs, vc, r1;
  logic                     unused_eac;

  assign xp = (NCH*N)'(x);
  for (genvar i = 0; i < NCH; i++) begin : g_chunk
    assign chunk[i] = xp[i*N +: N];
  end

  csa_eac_chain #(.W(N), .NT(NCH)) u_chain (.t(chunk), .sum(vs), .carry(vc));
  mod_adder_eac #(.N(N), .KIND(KIND)) u_madd (.a(vs), .b(vc), .s(r1), .eac(unused_eac));
  assign x1 = (&r1) ? '0 : r1;

  // channel 2^N+1
  localparam int NNEG = NCH / 2;                 // chunks 1, 3, ... carry weight -1
  localparam int NCSA = NCH - 1;                 // NCH chunks + CORR = NCH+1 operands
  localparam int MP1  = (1 << N) + 1;
  localparam int CORR = ((2 * NNEG - NCSA) % MP1 + MP1) % MP1;

  logic [NCH:0][N-1:0] op3;
  logic [N-1:0]        ws, wc;
  logic                unused_wrap;

  for (genvar i = 0; i < NCH; i++) begin : g_op3
    if (i % 2 == 1) begin : g_neg
      assign op3[i] = ~chunk[i];
    end else begin : g_pos
      assign op3[i] = chunk[i];
    end
  end
  assign op3[NCH] = N'(CORR);

  csa_eac_chain #(.W(N), .NT(NCH + 1), .CEAC(1'b1)) u_chain3 (.t(op3), .sum(ws), .carry(wc));
  mod_2np1_adder #(.N(N)) u_madd3 (.a({1'b0, ws}), .b({1'b0, wc}), .s(x3), .wrap(unused_wrap));
endmodule
