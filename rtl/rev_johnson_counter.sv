// rev_johnson_counter: N-stage Johnson (twisted ring) counter of reversible
// D flip-flops.
//
// A shift register whose first stage takes the complement of the last. The
// reversible D flip-flop has no inverted output, so a Feynman gate with its
// control input at 1 sits on the last stage: its first output is the last
// count bit and its second output, the complement, feeds the first stage.
// From reset (all zeros) the counter steps through 2N states per cycle; for
// N = 4, first stage leftmost: 0000 1000 1100 1110 1111 0111 0011 0001 0000.
// It thus divides the clock by 2N with N stages, half the stages a ring
// counter needs for the same ratio.
//
// Interface:
//   clk  common clock of all stages
//   rst  asynchronous, active-high reset to all zeros
//   q    stage outputs, q[0] = first stage
//
// The structure is the published one. The all-zero reset state is a local
// choice.
module rev_johnson_counter #(
  parameter int unsigned N = rev_pkg::COUNTER_BITS
) (
  input  logic         clk,
  input  logic         rst,
  output logic [N-1:0] q
);

  logic [N-1:0] stage_q;
  logic         last_n;

  for (genvar i = 0; i < N; i++) begin : g_stage
    rev_d_ff #(
      .RESET_VALUE (1'b0)
    ) u_dff (
      .clk (clk),
      .rst (rst),
      .d   ((i == 0) ? last_n : stage_q[(i == 0) ? 0 : i-1]),
      .q   (stage_q[i])
    );
  end

  feynman_gate u_fg (
    .a (stage_q[N-1]),
    .b (rev_pkg::FG_COMPLEMENT),
    .p (q[N-1]),
    .q (last_n)
  );

  if (N > 1) begin : g_out
    assign q[N-2:0] = stage_q[N-2:0];
  end

endmodule
