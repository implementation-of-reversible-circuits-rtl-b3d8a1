// Peres reversible gate, 3 inputs and 3 outputs.
//
// P = A, Q = A xor B, R = (A and B) xor C. With C tied to 0 it is a half adder:
// Q is the sum and R the carry. The modulo adders use it as the half-adder row that adds
// the end-around carry back in, and as the propagate/generate stage of the lookahead and
// prefix adders. Purely combinational; the function is the standard Peres gate.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
