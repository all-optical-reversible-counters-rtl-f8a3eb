// rev_counters_top_tb: end-to-end test of the four reversible counters, run
// with the top at its default size (4 bits).
//
// All four counters run at once from independent clocks of different periods.
// Each output is compared after every event with a reference model kept in
// this testbench: integer increment / decrement modulo 16 for the ripple
// counters, a one-hot rotation for the ring counter and a twisted-ring shift
// for the Johnson counter. The test counts how often each mechanism of the
// design occurred and fails if one never did:
//   up wrap (15 -> 0), down wrap (0 -> 15), count_en freezing either ripple
//   counter, ring counter returning to its start state, Johnson counter
//   loading the complement of its last stage (a 0 -> 1 and a 1 -> 0 entry),
//   and an asynchronous reset in mid-count on every counter.
module rev_counters_top_tb;

  localparam int unsigned N = rev_pkg::COUNTER_BITS;

  logic         up_pulse = 1'b0, up_en = 1'b1, up_rst = 1'b0;
  logic         dn_pulse = 1'b0, dn_en = 1'b1, dn_rst = 1'b0;
  logic         ring_clk = 1'b0, ring_rst = 1'b0;
  logic         jc_clk   = 1'b0, jc_rst   = 1'b0;
  logic [N-1:0] up_count, dn_count, ring_q, jc_q;
  logic [N-1:0] up_model, dn_model, ring_model, jc_model;

  int checks   = 0;
  int failures = 0;
  int n_up_wrap = 0, n_dn_wrap = 0, n_up_hold = 0, n_dn_hold = 0;
  int n_ring_wrap = 0, n_jc_fill = 0, n_jc_empty = 0, n_reset = 0;

  rev_counters_top dut (
    .up_count_pulse   (up_pulse),
    .up_count_en      (up_en),
    .up_rst           (up_rst),
    .up_count         (up_count),
    .down_count_pulse (dn_pulse),
    .down_count_en    (dn_en),
    .down_rst         (dn_rst),
    .down_count       (dn_count),
    .ring_clk         (ring_clk),
    .ring_rst         (ring_rst),
    .ring_q           (ring_q),
    .johnson_clk      (jc_clk),
    .johnson_rst      (jc_rst),
    .johnson_q        (jc_q)
  );

  task automatic expect_eq(input logic [N-1:0] got, input logic [N-1:0] exp,
                           input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  function automatic void report_and_finish();
    $display("events: up_wrap=%0d down_wrap=%0d up_hold=%0d down_hold=%0d ring_wrap=%0d johnson_fill=%0d johnson_empty=%0d reset=%0d",
             n_up_wrap, n_dn_wrap, n_up_hold, n_dn_hold, n_ring_wrap, n_jc_fill, n_jc_empty, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endfunction

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    report_and_finish();
  end

  // ---------------- asynchronous up counter ----------------
  task automatic up_run(input int pulses);
    for (int i = 0; i < pulses; i++) begin
      #7 up_pulse = 1'b1;
      #1;
      if (up_en) begin
        if (up_model == '1) n_up_wrap++;
        up_model = up_model + 1'b1;
      end else n_up_hold++;
      expect_eq(up_count, up_model, "up counter");
      #6 up_pulse = 1'b0;
    end
  endtask

  // ---------------- asynchronous down counter ----------------
  task automatic dn_run(input int pulses);
    for (int i = 0; i < pulses; i++) begin
      #5 dn_pulse = 1'b1;
      #1;
      if (dn_en) begin
        if (dn_model == '0) n_dn_wrap++;
        dn_model = dn_model - 1'b1;
      end else n_dn_hold++;
      expect_eq(dn_count, dn_model, "down counter");
      #4 dn_pulse = 1'b0;
    end
  endtask

  // ---------------- ring counter ----------------
  task automatic ring_run(input int cycles);
    for (int i = 0; i < cycles; i++) begin
      #6 ring_clk = 1'b1;
      #1;
      ring_model = {ring_model[N-2:0], ring_model[N-1]};
      if (ring_model == N'(1)) n_ring_wrap++;
      expect_eq(ring_q, ring_model, "ring counter");
      #5 ring_clk = 1'b0;
    end
  endtask

  // ---------------- Johnson counter ----------------
  task automatic jc_run(input int cycles);
    for (int i = 0; i < cycles; i++) begin
      #8 jc_clk = 1'b1;
      #1;
      if (!jc_model[N-1]) n_jc_fill++; else n_jc_empty++;
      jc_model = {jc_model[N-2:0], ~jc_model[N-1]};
      expect_eq(jc_q, jc_model, "Johnson counter");
      #7 jc_clk = 1'b0;
    end
  endtask

  task automatic reset_all();
    up_rst = 1'b1; dn_rst = 1'b1; ring_rst = 1'b1; jc_rst = 1'b1;
    #1;
    up_model = '0; dn_model = '0; ring_model = N'(1); jc_model = '0;
    expect_eq(up_count, up_model, "up counter reset");
    expect_eq(dn_count, dn_model, "down counter reset");
    expect_eq(ring_q, ring_model, "ring counter reset");
    expect_eq(jc_q, jc_model, "Johnson counter reset");
    #1;
    up_rst = 1'b0; dn_rst = 1'b0; ring_rst = 1'b0; jc_rst = 1'b0;
  endtask

  initial begin
    #1;
    reset_all();
    // Phase 1: everything counts; the ripple counters pass both wraps.
    fork
      up_run(37);
      dn_run(37);
      ring_run(13);
      jc_run(19);
    join
    // Phase 2: count_en low freezes both ripple counters.
    up_en = 1'b0;
    dn_en = 1'b0;
    fork
      up_run(4);
      dn_run(4);
    join
    up_en = 1'b1;
    dn_en = 1'b1;
    fork
      up_run(5);
      dn_run(6);
      ring_run(2);
      jc_run(3);
    join
    // Phase 3: reset in mid-count, then count again.
    n_reset++;
    reset_all();
    fork
      up_run(20);
      dn_run(20);
      ring_run(9);
      jc_run(11);
    join
    // Every mechanism must have happened at least once.
    checks++; if (n_up_wrap   == 0) begin failures++; $display("up counter never wrapped");   end
    checks++; if (n_dn_wrap   == 0) begin failures++; $display("down counter never wrapped"); end
    checks++; if (n_up_hold   == 0) begin failures++; $display("up counter never held");      end
    checks++; if (n_dn_hold   == 0) begin failures++; $display("down counter never held");    end
    checks++; if (n_ring_wrap == 0) begin failures++; $display("ring never returned to start"); end
    checks++; if (n_jc_fill   == 0) begin failures++; $display("Johnson never loaded a 1");   end
    checks++; if (n_jc_empty  == 0) begin failures++; $display("Johnson never loaded a 0");   end
    checks++; if (n_reset     == 0) begin failures++; $display("no mid-count reset");         end
    report_and_finish();
  end

endmodule
