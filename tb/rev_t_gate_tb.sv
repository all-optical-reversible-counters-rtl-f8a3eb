// rev_t_gate_tb: exhaustive check of the reversible T gate.
//
// Applies all 16 input vectors and compares {P,Q,R,S} with the gate's
// published truth table, written out below as a constant (row index = {A,B,C,D}).
// Also checks that no output vector repeats (the gate is a permutation) and
// the single vector quoted from the optical simulation: 1001 -> 1010.
module rev_t_gate_tb;

  // Expected {P,Q,R,S} for inputs 0000 .. 1111, copied row by row from the
  // published truth table.
  localparam logic [3:0] EXPECTED [16] = '{
    4'b0000, 4'b0010, 4'b0001, 4'b0011,
    4'b0110, 4'b0100, 4'b0111, 4'b0101,
    4'b1000, 4'b1010, 4'b1110, 4'b1100,
    4'b1111, 4'b1101, 4'b1001, 4'b1011
  };

  logic a, b, c, d;
  logic p, q, r, s;
  int   checks   = 0;
  int   failures = 0;
  logic [15:0] seen;

  rev_t_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      checks++;
      if ({p, q, r, s} !== EXPECTED[v]) begin
        failures++;
        $display("input %4b: got %4b expected %4b", 4'(v), {p, q, r, s}, EXPECTED[v]);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("input %4b: output %4b repeats", 4'(v), {p, q, r, s});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin
      failures++;
      $display("outputs do not cover all 16 vectors: %h", seen);
    end
    {a, b, c, d} = 4'b1001;
    #1;
    checks++;
    if ({p, q, r, s} !== 4'b1010) begin
      failures++;
      $display("optical-simulation vector 1001: got %4b", {p, q, r, s});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
