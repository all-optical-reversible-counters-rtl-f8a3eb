// rev_t_ff: T flip-flop built from one reversible T gate.
//
// The gate is wired as A = clock, B = previous state, C = T input, D = 0. With
// D = 0 the R output equals Q, and R is fed back to B. With A low the gate
// returns B unchanged (hold); with A high it returns B xor T (toggle). As a
// bare feedback loop a high clock with T = 1 would keep toggling, so this RTL
// breaks the loop with a register: at each rising clock edge the state takes
// the gate's R output evaluated with A at its asserted level (1). The result
// is an ordinary rising-edge T flip-flop whose next state is computed by the
// T gate. The gate's P and S outputs are garbage and stay unconnected.
//
// Interface:
//   clk  flip-flop clock (the gate's A input); in the ripple counters this is
//        driven by the previous stage
//   rst  asynchronous, active-high clear to 0
//   t    toggle input, sampled at the rising edge of clk
//   q    stored state
//
// The gate wiring is the published one. The rising-edge register, the
// asynchronous clear and its polarity are local choices.
module rev_t_ff (
  input  logic clk,
  input  logic rst,
  input  logic t,
  output logic q
);

  logic state;
  logic next_state;

  rev_t_gate u_gate (
    .a (1'b1),
    .b (state),
    .c (t),
    .d (1'b0),
    .p (),
    .q (),
    .r (next_state),
    .s ()
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= 1'b0;
    else     state <= next_state;
  end

  assign q = state;

endmodule
