// tb_rev_multiplier: self-checking test of the 16 x 16 reversible array
// multiplier. Applies corner operands (0, 1, all ones, single high bit) and
// random ones, and compares the 32-bit product with integer multiplication.
module tb_rev_multiplier;
  localparam int unsigned WIDTH = 16;
  logic [WIDTH-1:0] a, b;
  logic [2*WIDTH-1:0] prod;
  int checks = 0, failures = 0;

  rev_multiplier #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .prod(prod));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [WIDTH-1:0] ta, input logic [WIDTH-1:0] tb);
    longint unsigned ref_v;
    a = ta; b = tb;
    #1;
    ref_v = longint'(ta) * longint'(tb);
    checks++;
    if (prod !== ref_v[2*WIDTH-1:0]) begin
      failures++;
      $display("FAIL %h * %h -> %h exp %h", ta, tb, prod, ref_v[2*WIDTH-1:0]);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] corners [5];
    corners = '{'0, 1, {WIDTH{1'b1}}, {1'b1, {(WIDTH-1){1'b0}}}, 3};
    foreach (corners[i])
      foreach (corners[j])
        check_one(corners[i], corners[j]);
    for (int n = 0; n < 3000; n++)
      check_one(WIDTH'($urandom), WIDTH'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
