// rev_d_gate_tb: exhaustive check of the reversible D gate.
//
// Applies all 16 input vectors. P and Q are compared with the published truth
// table (its P and Q columns, as a constant below); R is checked as Q xor D
// and S as the input the Q multiplexer did not select (B when A is 0, C when
// A is 1). It also checks that the 16 output vectors are all different.
module rev_d_gate_tb;

  // Expected {P,Q} for inputs 0000 .. 1111, from the published truth table.
  localparam logic [1:0] EXPECTED_PQ [16] = '{
    2'b00, 2'b00, 2'b01, 2'b01,
    2'b00, 2'b00, 2'b01, 2'b01,
    2'b10, 2'b10, 2'b10, 2'b10,
    2'b11, 2'b11, 2'b11, 2'b11
  };

  logic a, b, c, d;
  logic p, q, r, s;
  logic exp_r, exp_s;
  int   checks   = 0;
  int   failures = 0;
  logic [15:0] seen;

  rev_d_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

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
      exp_r = EXPECTED_PQ[v][0] ^ d;
      exp_s = a ? c : b;
      checks++;
      if ({p, q} !== EXPECTED_PQ[v] || r !== exp_r || s !== exp_s) begin
        failures++;
        $display("input %4b: got %4b expected %2b%b%b", 4'(v), {p, q, r, s},
                 EXPECTED_PQ[v], exp_r, exp_s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("input %4b: output %4b repeats", 4'(v), {p, q, r, s});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
