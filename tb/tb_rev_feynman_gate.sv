// tb_rev_feynman_gate: exhaustive self-checking test of the Feynman gate.
// For all four inputs checks P = A and Q = A xor B, and that the four output
// pairs are all different (the gate is reversible).
module tb_rev_feynman_gate;
  logic a, b, p, q;
  logic [3:0] seen;
  int checks = 0, failures = 0;

  rev_feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = i[1:0];
      #1;
      checks++;
      // Expected values from the truth table of a controlled NOT.
      if (p !== i[1] || q !== (i[1] != i[0])) begin
        failures++;
        $display("FAIL a=%0b b=%0b p=%0b q=%0b", a, b, p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen != 4'hf) begin
      failures++;
      $display("FAIL mapping not one-to-one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
