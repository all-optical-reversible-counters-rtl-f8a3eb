// rev_d_ff: D flip-flop built from one reversible D gate.
//
// The gate is wired as A = clock, B = previous state, C = D input, D = 0, and
// its R output (equal to Q because D = 0) is fed back to B. The gate passes C
// while A is low and B while A is high, so as a bare loop it follows the data
// while the clock is low and freezes when the clock rises: the value it holds
// through the high phase is the data seen at the rising edge. This RTL breaks
// the loop with a register that captures, at each rising clock edge, the
// gate's R output evaluated with A at its low (pass) level. The result is an
// ordinary rising-edge D flip-flop whose next state is computed by the D gate.
// The gate's P and S outputs are garbage and stay unconnected.
//
// Interface:
//   clk  flip-flop clock (the gate's A input)
//   rst  asynchronous, active-high reset to RESET_VALUE
//   d    data input, sampled at the rising edge of clk
//   q    stored state
//
// The gate wiring is the published one. Using the rising edge, the reset
// (needed for the ring counter's single 1) and its polarity are local choices.
module rev_d_ff #(
  parameter logic RESET_VALUE = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);

  logic state;
  logic next_state;

  rev_d_gate u_gate (
    .a (1'b0),
    .b (state),
    .c (d),
    .d (1'b0),
    .p (),
    .q (),
    .r (next_state),
    .s ()
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= RESET_VALUE;
    else     state <= next_state;
  end

  assign q = state;

endmodule
