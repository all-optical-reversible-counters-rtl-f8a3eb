// rev_d_gate: the 4x4 reversible "D gate".
//
// A purely combinational permutation of the 16 input vectors {A,B,C,D}:
//   P = A
//   Q = A'.C + A.B      (a 2:1 multiplexer: C when A is low, B when A is high)
//   R = Q xor D
//   S = A'.B + A.C      (the input the multiplexer did not pick)
// Q selects between the stored state (B) and the data input (C), which is what
// a D flip-flop needs (see rev_d_ff). P, R and S carry the rest of the
// information so that the mapping stays one-to-one.
//
// Interface: scalar inputs a..d, scalar outputs p..s. No clock, no state.
//
// P, Q and R follow the published gate equations and the published statement
// that R is Q exclusive-ORed with D. S follows the published gate symbol
// (A'.B + A.C). The published truth table instead lists S = A'.B' + A.C and
// differs in R for inputs 0010 and 0011; both versions are reversible and
// agree on Q, the output the flip-flop uses. This implementation keeps the
// equations.
module rev_d_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  always_comb begin
    p = a;
    q = (~a & c) | (a & b);
    r = q ^ d;
    s = (~a & b) | (a & c);
  end

endmodule
