// feynman_gate_tb: exhaustive check of the 2x2 Feynman gate, including its
// two uses in the counters (control 1 gives the complement, control 0 a copy).
module feynman_gate_tb;

  logic a, b, p, q;
  int   checks   = 0;
  int   failures = 0;

  feynman_gate dut (.a, .b, .p, .q);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a) begin
        failures++;
        $display("a=%b b=%b: p=%b", a, b, p);
      end
      checks++;
      // control 1 must give the complement of a, control 0 a copy of a
      if (q !== (b ? !a : a)) begin
        failures++;
        $display("a=%b b=%b: q=%b", a, b, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
