// Shared types for the reversible RNS modular adders.
//
// adder_kind_e selects which carry-propagate adder a modulo 2^n-1 adder is built on.
// The carry-skip, carry-select and carry-lookahead kinds are the three adders that are
// compared against each other; ripple-carry and Brent-Kung are the two modulo adders of
// the earlier reversible designs. ADD_SKIP is the default everywhere, since the carry-skip
// adder is the one found to use the least power.
package rns_pkg;
  typedef enum logic [2:0] {
    ADD_SKIP   = 3'd0,  // carry-skip adder, HNG full adders
    ADD_SELECT = 3'd1,  // carry-select adder, HNG full adders and multiplexers
    ADD_CLA    = 3'd2,  // carry-lookahead adder, Peres/Feynman gates
    ADD_RCA    = 3'd3,  // ripple-carry adder with EAC, HNG + Peres rows
    ADD_BK     = 3'd4   // Brent-Kung prefix adder with EAC
  } adder_kind_e;
endpackage
