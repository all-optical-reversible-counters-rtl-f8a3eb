// rev_d_ff_tb: check of the D flip-flop built from the D gate.
//
// Two instances, reset to 0 and to 1. Walks the published D flip-flop table
// (clock low: output keeps the previous state; clock asserted, here a rising
// edge: output takes D) for every (D, previous state) pair, then compares 200
// random D values with a one-cycle delayed copy, and checks both reset values.
module rev_d_ff_tb;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic d   = 1'b0;
  logic q0, q1;
  logic model;
  int   checks   = 0;
  int   failures = 0;

  rev_d_ff #(.RESET_VALUE(1'b0)) dut0 (.clk, .rst, .d, .q(q0));
  rev_d_ff #(.RESET_VALUE(1'b1)) dut1 (.clk, .rst, .d, .q(q1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic expected, input string what);
    checks++;
    if (q0 !== expected || q1 !== expected) begin
      failures++;
      $display("%s: q0=%b q1=%b expected %b", what, q0, q1, expected);
    end
  endtask

  initial begin
    #1 rst = 1'b1;   // reset edge
    #1;
    checks++;
    if (q0 !== 1'b0 || q1 !== 1'b1) begin
      failures++;
      $display("reset values: q0=%b q1=%b", q0, q1);
    end
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 4; i++) begin
      logic prev;
      logic dv;
      {dv, prev} = 2'(i);
      d = prev;
      @(negedge clk);
      check(prev, "set previous state");
      d = dv;
      #2;
      check(prev, "clock low holds");
      @(negedge clk);
      check(dv, "clock edge loads D");
    end
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      model = d;
      @(negedge clk);
      check(model, "random D");
    end
    #1 rst = 1'b1;
    #1;
    checks++;
    if (q0 !== 1'b0 || q1 !== 1'b1) begin
      failures++;
      $display("asynchronous reset: q0=%b q1=%b", q0, q1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
