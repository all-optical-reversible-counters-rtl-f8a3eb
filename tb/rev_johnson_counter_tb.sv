// rev_johnson_counter_tb: check of the 4-stage Johnson counter.
//
// From the all-zero reset state the counter must step through the eight
// states 0000 1000 1100 1110 1111 0111 0011 0001 (first stage leftmost) and
// repeat them with a period of 2N cycles. The expected sequence is listed as a
// constant; the period is measured. A mid-sequence reset must clear it.
module rev_johnson_counter_tb;

  localparam int unsigned N = 4;

  // Expected states, written first stage leftmost.
  localparam logic [N-1:0] SEQ [2*N] = '{
    4'b0000, 4'b1000, 4'b1100, 4'b1110, 4'b1111, 4'b0111, 4'b0011, 4'b0001
  };

  logic         clk = 1'b0;
  logic         rst = 1'b0;
  logic [N-1:0] q;
  logic [N-1:0] first_left;
  int checks   = 0;
  int failures = 0;
  int cycle    = 0;
  int last_zero = 0;

  rev_johnson_counter #(.N(N)) dut (.clk, .rst, .q);

  always #5 clk = ~clk;

  // q[0] is the first stage; print and compare with the first stage leftmost
  always_comb for (int i = 0; i < N; i++) first_left[N-1-i] = q[i];

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1;   // reset edge
    #1;
    checks++;
    if (first_left !== SEQ[0]) begin
      failures++;
      $display("reset state %b", first_left);
    end
    @(negedge clk);
    rst = 1'b0;
    for (int i = 1; i <= 24; i++) begin
      @(negedge clk);
      cycle++;
      checks++;
      if (first_left !== SEQ[i % (2*N)]) begin
        failures++;
        $display("cycle %0d: %b expected %b", cycle, first_left, SEQ[i % (2*N)]);
      end
      if (first_left == '0) begin
        checks++;
        if (cycle - last_zero != 2*N) begin
          failures++;
          $display("period %0d, expected %0d", cycle - last_zero, 2*N);
        end
        last_zero = cycle;
      end
    end
    @(negedge clk);  // leave the counter in a non-zero state
    #1 rst = 1'b1;
    #1;
    checks++;
    if (first_left !== '0) begin
      failures++;
      $display("asynchronous reset: %b", first_left);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
