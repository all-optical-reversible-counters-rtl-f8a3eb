// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//
//   P = A
//   Q = A xor B
// With B held at 1 (rev_pkg::FG_COMPLEMENT) it delivers a signal and its
// complement; with B held at 0 (rev_pkg::FG_COPY) it delivers two copies.
// In reversible logic a net may not fan out, so the counters use this gate
// wherever one flip-flop output has to go to two places.
//
// Interface: scalar inputs a, b; scalar outputs p, q. Combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
