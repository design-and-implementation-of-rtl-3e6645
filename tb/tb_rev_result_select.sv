// tb_rev_result_select: self-checking test of the Fredkin-gate result
// selector. Fills the eight input words with random values and checks, for
// every select code, that the output equals the selected word.
module tb_rev_result_select;
  localparam int unsigned W = 33;
  logic [W-1:0] res_in [8];
  logic [2:0] sel;
  logic [W-1:0] y;
  int checks = 0, failures = 0;

  rev_result_select #(.W(W)) dut (.res_in(res_in), .sel(sel), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      foreach (res_in[k]) res_in[k] = {$urandom, $urandom};
      for (int s = 0; s < 8; s++) begin
        sel = s[2:0];
        #1;
        checks++;
        if (y !== res_in[s]) begin
          failures++;
          $display("FAIL sel=%0d y=%h exp %h", s, y, res_in[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
