// rev_ring_counter: N-stage ring counter of reversible D flip-flops.
//
// A circular shift register: stage i takes stage i-1 and the first stage takes
// the last. Reset loads a single 1 into the first stage, which then circulates
// one stage per rising clock edge (for N = 4, with the first stage written
// leftmost: 1000 -> 0100 -> 0010 -> 0001 -> 1000). The counter divides the
// clock by N and each output is high for one cycle in N.
//
// Interface:
//   clk  common clock of all stages
//   rst  asynchronous, active-high reset to the one-hot start state
//   q    stage outputs, q[0] = first stage
//
// An assertion checks that exactly one stage is high at every clock edge
// outside reset.
//
// The structure and the start state are the published ones. The reset's
// polarity and its asynchronous action are local choices.
module rev_ring_counter #(
  parameter int unsigned N = rev_pkg::COUNTER_BITS
) (
  input  logic         clk,
  input  logic         rst,
  output logic [N-1:0] q
);

  for (genvar i = 0; i < N; i++) begin : g_stage
    rev_d_ff #(
      .RESET_VALUE ((i == 0) ? 1'b1 : 1'b0)
    ) u_dff (
      .clk (clk),
      .rst (rst),
      .d   ((i == 0) ? q[N-1] : q[(i == 0) ? 0 : i-1]),
      .q   (q[i])
    );
  end

  a_one_hot: assert property (@(posedge clk) disable iff (rst) $onehot(q))
    else $error("ring counter lost its single 1: %b", q);

endmodule
