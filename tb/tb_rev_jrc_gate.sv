// tb_rev_jrc_gate: exhaustive self-checking test of the JRC gate.
// Runs all 32 input vectors. With D = 0 it checks the full adder (Sel = 0)
// and full subtractor (Sel = 1) behaviour against integer arithmetic, checks
// the pass-through lines P, R, T, and checks that all 32 output vectors are
// different, i.e. the gate is reversible.
module tb_rev_jrc_gate;
  logic a, b, c, d, sel, p, q, r, s, t;
  logic [31:0] seen;
  int checks = 0, failures = 0;
  int sum_i, diff_i;
  logic exp_q, exp_s;

  rev_jrc_gate dut (.a(a), .b(b), .c(c), .d(d), .sel(sel),
                    .p(p), .q(q), .r(r), .s(s), .t(t));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 32; i++) begin
      {a, b, c, d, sel} = i[4:0];
      #1;
      sum_i  = int'(a) + int'(b) + int'(c);
      diff_i = int'(a) - int'(b) - int'(c);
      if (!sel) begin
        exp_q = sum_i[0];
        exp_s = d ^ (sum_i >= 2);
      end else begin
        exp_q = diff_i[0];
        exp_s = d ^ (diff_i < 0);
      end
      checks++;
      if (q !== exp_q || s !== exp_s) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b d=%0b sel=%0b q=%0b s=%0b exp q=%0b s=%0b",
                 a, b, c, d, sel, q, s, exp_q, exp_s);
      end
      checks++;
      if (p !== a || r !== c || t !== sel) begin
        failures++;
        $display("FAIL pass-through lines for in=%05b", i[4:0]);
      end
      seen[{p, q, r, s, t}] = 1'b1;
    end
    checks++;
    if (seen != 32'hffff_ffff) begin
      failures++;
      $display("FAIL mapping not one-to-one: %h", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
