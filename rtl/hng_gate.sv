// HNG reversible gate, 4 inputs and 4 outputs.
//
// P = A, Q = B, R = A xor B xor C, S = ((A xor B) and C) xor (A and B) xor D.
// With D tied to 0 it is a full adder: R is the sum of A, B and C, S the carry, and P, Q
// are garbage outputs. Every full adder of the carry-save, ripple, carry-skip and
// carry-select adders is one HNG gate. Purely combinational; the function is the standard
// HNG gate.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
