// rev_async_down_counter: N-bit asynchronous (ripple) down counter of
// reversible T flip-flops.
//
// Stage 0 is clocked by count_pulse. Every stage has its T input on count_en
// (tied to logic 1 in normal use). Behind each stage except the last sits a
// Feynman gate with its control input at 0: both outputs copy the stage's
// state, one as the count bit and one as the next stage's clock. A stage
// rising from 0 to 1 therefore gives the next stage a rising edge and makes it
// toggle, so the counter counts down by one per rising edge of count_pulse and
// wraps from 0 to 2^N-1.
//
// Interface:
//   count_pulse  counting clock; one decrement per rising edge
//   count_en     T input of every stage; 0 freezes the count
//   rst          asynchronous, active-high clear of all stages
//   count        count value, bit 0 = first stage (least significant)
//
// Timing: the borrow ripples through the stages with no register between
// them, so count is only valid after the ripple has settled (zero time in an
// RTL simulation). The stage clocks are derived from flip-flop outputs.
//
// The structure (four T flip-flops, three Feynman gates with control 0) is the
// published one. The reset is a local addition.
module rev_async_down_counter #(
  parameter int unsigned N = rev_pkg::COUNTER_BITS
) (
  input  logic         count_pulse,
  input  logic         count_en,
  input  logic         rst,
  output logic [N-1:0] count
);

  logic [N-1:0] stage_q;
  logic [N-1:0] stage_clk;

  assign stage_clk[0] = count_pulse;

  for (genvar i = 0; i < N; i++) begin : g_stage
    rev_t_ff u_tff (
      .clk (stage_clk[i]),
      .rst (rst),
      .t   (count_en),
      .q   (stage_q[i])
    );

    if (i < N - 1) begin : g_fg
      feynman_gate u_fg (
        .a (stage_q[i]),
        .b (rev_pkg::FG_COPY),
        .p (count[i]),
        .q (stage_clk[i+1])
      );
    end else begin : g_last
      assign count[i] = stage_q[i];
    end
  end

endmodule
