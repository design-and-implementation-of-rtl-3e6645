// tb_rev_not_gate: exhaustive self-checking test of the reversible NOT gate.
// Applies both input values, checks P = A', and checks that the two outputs
// differ (the mapping is one-to-one).
module tb_rev_not_gate;
  logic a, p;
  logic [1:0] seen;
  int checks = 0, failures = 0;

  rev_not_gate dut (.a(a), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 2; i++) begin
      a = i[0];
      #1;
      checks++;
      if (p !== !i[0]) begin
        failures++;
        $display("FAIL a=%0b p=%0b", a, p);
      end
      seen[p] = 1'b1;
    end
    checks++;
    if (seen != 2'b11) begin
      failures++;
      $display("FAIL mapping not one-to-one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
