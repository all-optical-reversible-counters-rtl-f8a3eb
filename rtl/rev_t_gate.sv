// rev_t_gate: the 4x4 reversible "T gate".
//
// A purely combinational permutation of the 16 input vectors {A,B,C,D}:
//   P = A
//   Q = B.C' + A'.B + A.B'.C
//   R = Q xor D
//   S = A'.C + A.B
// With A low, Q copies B; with A high, Q is B xor C. That is the behaviour a T
// flip-flop needs when A is the clock, B the stored state and C the toggle
// input (see rev_t_ff). The extra outputs R and S make the mapping one-to-one,
// so every output vector identifies its input vector.
//
// Interface: scalar inputs a..d, scalar outputs p..s. No clock, no state;
// outputs settle in the same delta cycle as the inputs.
//
// The equations and the truth table are the published ones and agree on all
// 16 rows; nothing here is a local choice.
module rev_t_gate (
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
    q = (b & ~c) | (~a & b) | (a & ~b & c);
    r = q ^ d;
    s = (~a & c) | (a & b);
  end

endmodule
