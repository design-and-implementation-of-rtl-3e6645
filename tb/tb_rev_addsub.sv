// tb_rev_addsub: self-checking test of the 16-bit JRC adder/subtractor.
// Applies corner operands and random ones in both modes with both values of
// carry/borrow in, and compares SUM and COUT with integer arithmetic:
// {COUT, SUM} = A + B + CIN when adding; SUM = A - B - CIN with COUT = 1 when
// A < B + CIN when subtracting.
module tb_rev_addsub;
  localparam int unsigned WIDTH = 16;
  logic [WIDTH-1:0] a, b, sum;
  logic cin, sub, cout;
  int checks = 0, failures = 0;

  rev_addsub #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .cin(cin), .sub(sub),
                                   .sum(sum), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [WIDTH-1:0] ta, input logic [WIDTH-1:0] tb,
                           input logic tcin, input logic tsub);
    longint ref_v;
    logic [WIDTH-1:0] exp_sum;
    logic exp_cout;
    a = ta; b = tb; cin = tcin; sub = tsub;
    #1;
    if (!tsub) begin
      ref_v    = longint'(ta) + longint'(tb) + longint'(tcin);
      exp_sum  = ref_v[WIDTH-1:0];
      exp_cout = ref_v[WIDTH];
    end else begin
      ref_v    = longint'(ta) - longint'(tb) - longint'(tcin);
      exp_sum  = ref_v[WIDTH-1:0];
      exp_cout = (ref_v < 0);
    end
    checks++;
    if (sum !== exp_sum || cout !== exp_cout) begin
      failures++;
      $display("FAIL sub=%0b a=%h b=%h cin=%0b -> sum=%h cout=%0b exp %h %0b",
               tsub, ta, tb, tcin, sum, cout, exp_sum, exp_cout);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] corners [5];
    corners = '{'0, 1, {WIDTH{1'b1}}, {1'b1, {(WIDTH-1){1'b0}}}, {1'b0, {(WIDTH-1){1'b1}}}};
    for (int m = 0; m < 2; m++)
      for (int ci = 0; ci < 2; ci++)
        foreach (corners[i])
          foreach (corners[j])
            check_one(corners[i], corners[j], ci[0], m[0]);
    for (int n = 0; n < 4000; n++)
      check_one(WIDTH'($urandom), WIDTH'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
