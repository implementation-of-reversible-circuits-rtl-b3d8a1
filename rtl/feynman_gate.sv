// Feynman (controlled-NOT) reversible gate, 2 inputs and 2 outputs.
//
// P = A, Q = A xor B. The mapping is its own inverse. With B tied to 0 it copies A
// (fan-out without losing information); here it forms the sum bits p xor c of the
// lookahead and prefix adders. Purely combinational. The gate function is the one of
// the standard Feynman gate; nothing in it is a design choice.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
