// Modulo 2^N-1 adder with end-around carry (EAC) on a selectable reversible adder.
//
// For KIND = ADD_SKIP, ADD_SELECT or ADD_CLA the chosen N-bit adder adds a and b with a
// carry-in of 0. Its carry-out (weight 2^N = 1 modulo 2^N-1) is the end-around carry; a
// ripple row of Peres half adders adds it back to the sum, the same way the ripple-carry
// modulo adder does, so no combinational loop is formed. For KIND = ADD_RCA the
// two-row ripple-carry modulo adder is used, for KIND = ADD_BK the Brent-Kung modulo adder.
// Result: s == a + b (mod 2^N-1) for a, b < 2^N-1. The value 2^N-1 (all ones) can appear as
// a second code for zero; users that need a canonical residue map it to 0.
// Purely combinational. Selecting the carry-skip, carry-select or carry-lookahead adder
// for a modulo adder with EAC follows the design; adding the carry back through a Peres
// half-adder row is this design's choice for those three kinds.
module mod_adder_eac
  import rns_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter adder_kind_e KIND = ADD_SKIP
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         eac
);
  if (KIND == ADD_RCA) begin : g_rca
    rca_eac_rev #(.N(N)) u_add (.a(a), .b(b), .cin(1'b0), .s(s), .eac(eac));
  end else if (KIND == ADD_BK) begin : g_bk
    bk_mod_adder #(.N(N)) u_add (.a(a), .b(b), .s(s), .eac(eac));
  end else begin : g_eac
    logic [N-1:0] t;
    logic [N:0]   h;
    if (KIND == ADD_SELECT) begin : g_sel
      carry_select_rev #(.WIDTH(N)) u_add (.a(a), .b(b), .cin(1'b0), .s(t), .cout(eac));
    end else if (KIND == ADD_CLA) begin : g_cla
      cla_rev #(.WIDTH(N)) u_add (.a(a), .b(b), .cin(1'b0), .s(t), .cout(eac));
    end else begin : g_skip
      carry_skip_rev #(.WIDTH(N)) u_add (.a(a), .b(b), .cin(1'b0), .s(t), .cout(eac));
    end
    // half-adder row adding the end-around carry
    assign h[0] = eac;
    for (genvar i = 0; i < N; i++) begin : g_ha
      logic unused_p;
      peres_gate u_pg (.a(t[i]), .b(h[i]), .c(1'b0), .p(unused_p), .q(s[i]), .r(h[i+1]));
    end
    logic unused_h;
    assign unused_h = h[N];
  end
endmodule
