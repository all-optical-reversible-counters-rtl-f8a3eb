// rev_ring_counter_tb: check of the 4-stage ring counter.
//
// After reset the state must be 1000 (first stage leftmost). Over 20 clock
// cycles each state must be the previous one rotated by one stage, exactly
// one stage must be high, and the start state must come back every N cycles.
// A reset in mid-sequence must restore 1000 without a clock edge.
module rev_ring_counter_tb;

  localparam int unsigned N = 4;

  logic         clk = 1'b0;
  logic         rst = 1'b0;
  logic [N-1:0] q;
  logic [N-1:0] model;
  int checks   = 0;
  int failures = 0;
  int cycle    = 0;
  int last_start;

  rev_ring_counter #(.N(N)) dut (.clk, .rst, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("%s (cycle %0d): q[0..%0d]=%b expected %b", what, cycle, N-1, q, model);
    end
  endtask

  initial begin
    model = N'(1);               // q[0] = first stage
    #1 rst = 1'b1;   // reset edge
    #1;
    check("reset state 1000");
    @(negedge clk);
    rst = 1'b0;
    last_start = 0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      cycle++;
      model = {model[N-2:0], model[N-1]};   // first stage -> second -> ...
      check("shift");
      checks++;
      if (!$onehot(q)) begin
        failures++;
        $display("cycle %0d: not one-hot: %b", cycle, q);
      end
      if (q == N'(1)) begin
        checks++;
        if (cycle - last_start != N) begin
          failures++;
          $display("period %0d, expected %0d", cycle - last_start, N);
        end
        last_start = cycle;
      end
    end
    #1 rst = 1'b1;
    #1 model = N'(1);
    check("asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
