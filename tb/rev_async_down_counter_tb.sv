// rev_async_down_counter_tb: check of the 4-bit ripple down counter.
//
// After reset, applies 40 count pulses (two and a half wraps) and compares the
// count after each with an integer reference decremented modulo 2^N. It checks
// that the count goes from 0 to 2^N-1, that count_en = 0 freezes the count
// across pulses, and that reset clears it at once.
module rev_async_down_counter_tb;

  localparam int unsigned N = 4;

  logic         pulse = 1'b0;
  logic         en    = 1'b1;
  logic         rst   = 1'b0;
  logic [N-1:0] count;
  logic [N-1:0] model;
  int checks   = 0;
  int failures = 0;
  int wraps    = 0;

  rev_async_down_counter #(.N(N)) dut (.count_pulse(pulse), .count_en(en), .rst, .count);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_pulse();
    #5 pulse = 1'b1;
    #5 pulse = 1'b0;
  endtask

  task automatic check(input string what);
    checks++;
    if (count !== model) begin
      failures++;
      $display("%s: count=%0d expected %0d", what, count, model);
    end
  endtask

  initial begin
    model = '0;
    #1 rst = 1'b1;   // reset edge
    #1;
    check("reset");
    #4 rst = 1'b0;
    for (int i = 0; i < 40; i++) begin
      apply_pulse();
      if (model == '0) wraps++;
      model = model - 1'b1;
      check("count down");
    end
    en = 1'b0;
    for (int i = 0; i < 5; i++) begin
      apply_pulse();
      check("count disabled");
    end
    en = 1'b1;
    apply_pulse();
    model = model - 1'b1;
    check("count re-enabled");
    #2 rst = 1'b1;
    model = '0;
    #1;
    check("asynchronous clear");
    checks++;
    if (wraps < 2) begin
      failures++;
      $display("counter wrapped only %0d times", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
