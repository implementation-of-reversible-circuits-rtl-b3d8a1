// Modulo 2^N+1 adder for residues of N+1 bits.
//
// Residues modulo 2^N+1 lie in [0, 2^N] and need one bit more than the other channels.
// The adder forms the (N+2)-bit sum a + b and subtracts 2^N+1 once when the sum reaches
// it; wrap reports that subtraction. Valid for a, b <= 2^N; then s == (a + b) mod (2^N+1).
// Purely combinational. Only the need for such an adder is given; this plain
// add-and-correct form is this design's choice.
module mod_2np1_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] s,
  output logic       wrap
);
  localparam logic [N+1:0] MOD = (N+2)'((1 << N) + 1);

  logic [N+1:0] sum, red;

  assign sum  = (N+2)'(a) + (N+2)'(b);
  assign wrap = (sum >= MOD);
  assign red  = wrap ? (sum - MOD) : sum;
  assign s    = red[N:0];

  logic unused;
  assign unused = red[N+1];
endmodule
