// rev_counters_top: the four reversible counters side by side.
//
// Four independent 4-bit counters, each with its own ports:
//   up_*       asynchronous up counter (T flip-flops, Feynman gates at 1)
//   down_*     asynchronous down counter (T flip-flops, Feynman gates at 0)
//   ring_*     ring counter (D flip-flops)
//   johnson_*  Johnson counter (D flip-flops, Feynman gate at 1)
// The counters share no signal; their timing is described in their own
// modules. Bit 0 of each output vector is the counter's first stage.
module rev_counters_top #(
  parameter int unsigned N = rev_pkg::COUNTER_BITS
) (
  input  logic         up_count_pulse,
  input  logic         up_count_en,
  input  logic         up_rst,
  output logic [N-1:0] up_count,

  input  logic         down_count_pulse,
  input  logic         down_count_en,
  input  logic         down_rst,
  output logic [N-1:0] down_count,

  input  logic         ring_clk,
  input  logic         ring_rst,
  output logic [N-1:0] ring_q,

  input  logic         johnson_clk,
  input  logic         johnson_rst,
  output logic [N-1:0] johnson_q
);

  rev_async_up_counter #(.N(N)) u_up (
    .count_pulse (up_count_pulse),
    .count_en    (up_count_en),
    .rst         (up_rst),
    .count       (up_count)
  );

  rev_async_down_counter #(.N(N)) u_down (
    .count_pulse (down_count_pulse),
    .count_en    (down_count_en),
    .rst         (down_rst),
    .count       (down_count)
  );

  rev_ring_counter #(.N(N)) u_ring (
    .clk (ring_clk),
    .rst (ring_rst),
    .q   (ring_q)
  );

  rev_johnson_counter #(.N(N)) u_johnson (
    .clk (johnson_clk),
    .rst (johnson_rst),
    .q   (johnson_q)
  );

endmodule
