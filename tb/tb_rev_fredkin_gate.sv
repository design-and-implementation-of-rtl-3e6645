// tb_rev_fredkin_gate: exhaustive self-checking test of the Fredkin gate.
// For all eight inputs checks the controlled swap (B and C exchanged when
// A = 1), that the number of ones is kept, and that the mapping is
// one-to-one.
module tb_rev_fredkin_gate;
  logic a, b, c, p, q, r;
  logic [7:0] seen;
  logic [2:0] exp_out;
  int checks = 0, failures = 0;

  rev_fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = i[2:0];
      #1;
      exp_out = i[2] ? {i[2], i[0], i[1]} : i[2:0];
      checks++;
      if ({p, q, r} !== exp_out) begin
        failures++;
        $display("FAIL in=%03b out=%0b%0b%0b exp=%03b", i[2:0], p, q, r, exp_out);
      end
      checks++;
      if ($countones({p, q, r}) != $countones(i[2:0])) begin
        failures++;
        $display("FAIL not conservative for in=%03b", i[2:0]);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen != 8'hff) begin
      failures++;
      $display("FAIL mapping not one-to-one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
