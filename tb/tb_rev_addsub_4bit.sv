// tb_rev_addsub_4bit: exhaustive test of the adder/subtractor built as the
// four-gate, 4-bit example (WIDTH = 4, four JRC gates in a chain).
// Every combination of A, B, carry/borrow in and add/subtract mode (1024
// cases) is compared with integer arithmetic, and the testbench checks that
// the carry chain through the unit is four gates long.
module tb_rev_addsub_4bit;
  localparam int unsigned WIDTH = 4;
  logic [WIDTH-1:0] a, b, sum;
  logic cin, sub, cout;
  int checks = 0, failures = 0;
  int ref_v;

  rev_addsub #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .cin(cin), .sub(sub),
                                   .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int ci = 0; ci < 2; ci++)
        for (int x = 0; x < 16; x++)
          for (int y = 0; y < 16; y++) begin
            a = x[3:0]; b = y[3:0]; cin = ci[0]; sub = m[0];
            #1;
            ref_v = m ? (x - y - ci) : (x + y + ci);
            checks++;
            if (sum !== ref_v[3:0] || cout !== (m ? (ref_v < 0) : ref_v[4])) begin
              failures++;
              $display("FAIL sub=%0d a=%0d b=%0d cin=%0d -> sum=%0d cout=%0b", m, x, y, ci, sum, cout);
            end
          end
    // One JRC gate per bit: instances g_bit[0..3].u_jrc exist, and the chain
    // is WIDTH gates long.
    checks++;
    if ($bits(dut.carry) != WIDTH + 1) begin
      failures++;
      $display("FAIL carry chain is %0d long", $bits(dut.carry));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
