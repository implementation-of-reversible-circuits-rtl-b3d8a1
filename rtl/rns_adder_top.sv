// RNS modular adder for the moduli set {2^N-1, 2^(N+K), 2^N+1}.
//
// Two binary operands a and b of 3N+K bits are converted to residues by two forward
// converters. The three channels then add independently and in parallel:
//  - channel 1, modulo 2^N-1: modulo adder with end-around carry on the reversible adder
//    chosen by KIND (carry-skip by default); all-ones is mapped to 0;
//  - channel 2, modulo 2^(N+K): plain binary addition whose carry-out is dropped, on the
//    reversible adder of the same family (carry-skip for ADD_RCA and ADD_BK);
//  - channel 3, modulo 2^N+1: add-and-correct adder.
// The reverse converter turns the residue sum back into binary: s = (a + b) mod M with
// M = (2^N-1) * 2^(N+K) * (2^N+1). Any a, b below 2^(3N+K) are accepted.
// Status outputs: eac1 is the end-around carry of channel 1, wrap2 the dropped carry of
// channel 2 and wrap3 the modulus subtraction of channel 3.
// Purely combinational: results are valid one propagation delay after the inputs change.
// The chain forward converter - channel adders - reverse converter is the usual RNS
// organisation; the defaults N = 8, K = 4 (a 16-bit modulo 2^2N-1 adder in the reverse
// converter, the width of the compared adders) are this design's choice.
module rns_adder_top
  import rns_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 4,
  parameter adder_kind_e KIND = ADD_SKIP
) (
  input  logic [3*N+K-1:0] a,
  input  logic [3*N+K-1:0] b,
  output logic [N-1:0]     a_r1,
  output logic [N+K-1:0]   a_r2,
  output logic [N:0]       a_r3,
  output logic [N-1:0]     b_r1,
  output logic [N+K-1:0]   b_r2,
  output logic [N:0]       b_r3,
  output logic [N-1:0]     s_r1,
  output logic [N+K-1:0]   s_r2,
  output logic [N:0]       s_r3,
  output logic [3*N+K-1:0] s,
  output logic             eac1,
  output logic             wrap2,
  output logic             wrap3
);
  forward_converter #(.N(N), .K(K), .KIND(KIND)) u_fwd_a (.x(a), .x1(a_r1), .x2(a_r2), .x3(a_r3));
  forward_converter #(.N(N), .K(K), .KIND(KIND)) u_fwd_b (.x(b), .x1(b_r1), .x2(b_r2), .x3(b_r3));

  // channel 1: modulo 2^N-1
  logic [N-1:0] c1;
  mod_adder_eac #(.N(N), .KIND(KIND)) u_ch1 (.a(a_r1), .b(b_r1), .s(c1), .eac(eac1));
  assign s_r1 = (&c1) ? '0 : c1;

  // channel 2: modulo 2^(N+K), binary addition
  if (KIND == ADD_SELECT) begin : g_ch2_sel
    carry_select_rev #(.WIDTH(N+K)) u_ch2 (.a(a_r2), .b(b_r2), .cin(1'b0), .s(s_r2), .cout(wrap2));
  end else if (KIND == ADD_CLA) begin : g_ch2_cla
    cla_rev #(.WIDTH(N+K)) u_ch2 (.a(a_r2), .b(b_r2), .cin(1'b0), .s(s_r2), .cout(wrap2));
  end else begin : g_ch2_skip
    carry_skip_rev #(.WIDTH(N+K)) u_ch2 (.a(a_r2), .b(b_r2), .cin(1'b0), .s(s_r2), .cout(wrap2));
  end

  // channel 3: modulo 2^N+1
  mod_2np1_adder #(.N(N)) u_ch3 (.a(a_r3), .b(b_r3), .s(s_r3), .wrap(wrap3));

  reverse_converter #(.N(N), .K(K), .KIND(KIND)) u_rev (.x1(s_r1), .x2(s_r2), .x3(s_r3), .x(s));
endmodule
