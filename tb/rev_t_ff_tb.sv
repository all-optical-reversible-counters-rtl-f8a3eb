// rev_t_ff_tb: check of the T flip-flop built from the T gate.
//
// First walks the published T flip-flop table: with the clock low the output
// keeps the previous state, with the clock asserted (here: a rising edge) it
// becomes previous state xor T, for both previous states and both T values.
// Then drives 200 random T values and compares each edge with a reference
// model, and checks that the asynchronous clear acts without a clock edge.
module rev_t_ff_tb;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic t   = 1'b0;
  logic q;
  logic model;
  int   checks   = 0;
  int   failures = 0;
  int   cycles   = 0;

  rev_t_ff dut (.clk, .rst, .t, .q);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic expected, input string what);
    checks++;
    if (q !== expected) begin
      failures++;
      $display("%s: q=%b expected %b", what, q, expected);
    end
  endtask

  initial begin
    #1 rst = 1'b1;   // reset edge
    #1;
    check(1'b0, "asynchronous clear");
    @(negedge clk);
    rst = 1'b0;
    model = 1'b0;
    // Published table: for each (T, previous state) pair, clock 0 holds and
    // clock 1 gives previous xor T.
    for (int i = 0; i < 4; i++) begin
      logic prev;
      logic tv;
      {tv, prev} = 2'(i);
      // bring the flip-flop to `prev`
      t = (q != prev);
      @(negedge clk);
      check(prev, "set previous state");
      t = tv;
      #2;                 // clock still low: output must hold
      check(prev, "clock low holds");
      @(negedge clk);     // one rising edge has passed
      check(prev ^ tv, "clock edge applies T");
    end
    model = q;
    for (int i = 0; i < 200; i++) begin
      t = 1'($urandom);
      @(posedge clk);
      model = model ^ t;
      @(negedge clk);
      check(model, "random T");
    end
    // clear in the middle of the low phase, no edge
    #1 rst = 1'b1;
    #1;
    check(1'b0, "asynchronous clear without clock edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
