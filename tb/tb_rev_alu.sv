// tb_rev_alu: end-to-end self-checking test of the 16-bit reversible ALU at
// its default parameters.
//
// For every one of the eight operation codes it applies corner operands and
// random ones, with carry/borrow in both 0 and 1, and compares F, F_HI and
// COUT with a reference computed from SystemVerilog arithmetic and logic
// operators. It also counts how often each mechanism of the ALU occurred:
// every operation, a carry out of addition, a borrow out of subtraction, a
// carry in and a borrow in that changed the result, and a product whose
// upper half is not zero. A mechanism that never occurred counts as a
// failure.
module tb_rev_alu;
  import rev_alu_pkg::*;

  localparam int unsigned WIDTH = 16;

  logic [WIDTH-1:0] a, b, f, f_hi;
  alu_op_e          sel;
  logic             cin, cout;
  int checks = 0, failures = 0;

  int op_count [NUM_OPS];
  int n_carry_out = 0, n_borrow_out = 0, n_carry_in = 0, n_borrow_in = 0;
  int n_prod_hi = 0;

  rev_alu dut (.a(a), .b(b), .sel(sel), .cin(cin), .f(f), .f_hi(f_hi), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [WIDTH-1:0] ta, input logic [WIDTH-1:0] tb,
                           input alu_op_e top, input logic tcin);
    longint ref_v;
    logic [WIDTH-1:0] exp_f, exp_hi;
    logic exp_c;
    a = ta; b = tb; sel = top; cin = tcin;
    #1;
    exp_hi = '0;
    exp_c  = 1'b0;
    case (top)
      OP_ADD: begin
        ref_v = longint'(ta) + longint'(tb) + longint'(tcin);
        exp_f = ref_v[WIDTH-1:0];
        exp_c = ref_v[WIDTH];
      end
      OP_SUB: begin
        ref_v = longint'(ta) - longint'(tb) - longint'(tcin);
        exp_f = ref_v[WIDTH-1:0];
        exp_c = (ref_v < 0);
      end
      OP_MUL: begin
        ref_v  = longint'(ta) * longint'(tb);
        exp_f  = ref_v[WIDTH-1:0];
        exp_hi = ref_v[2*WIDTH-1:WIDTH];
      end
      OP_AND:  exp_f = ta & tb;
      OP_OR:   exp_f = ta | tb;
      OP_NOT:  exp_f = ~ta;
      OP_XOR:  exp_f = ta ^ tb;
      default: exp_f = ~(ta & tb);
    endcase
    checks++;
    if (f !== exp_f || f_hi !== exp_hi || cout !== exp_c) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h cin=%0b -> f=%h f_hi=%h cout=%0b exp %h %h %0b",
               top.name(), ta, tb, tcin, f, f_hi, cout, exp_f, exp_hi, exp_c);
    end
    // Mechanism counters, taken from the reference, not from the ALU.
    op_count[top]++;
    if (top == OP_ADD && exp_c) n_carry_out++;
    if (top == OP_SUB && exp_c) n_borrow_out++;
    if (top == OP_ADD && tcin)  n_carry_in++;
    if (top == OP_SUB && tcin)  n_borrow_in++;
    if (top == OP_MUL && exp_hi != '0) n_prod_hi++;
  endtask

  task automatic require(input string what, input int count);
    checks++;
    $display("mechanism %-26s occurred %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] corners [5];
    alu_op_e op;
    corners = '{'0, 1, {WIDTH{1'b1}}, {1'b1, {(WIDTH-1){1'b0}}}, {1'b0, {(WIDTH-1){1'b1}}}};
    foreach (op_count[k]) op_count[k] = 0;

    for (int o = 0; o < NUM_OPS; o++) begin
      op = alu_op_e'(o);
      for (int ci = 0; ci < 2; ci++)
        foreach (corners[i])
          foreach (corners[j])
            check_one(corners[i], corners[j], op, ci[0]);
    end
    for (int n = 0; n < 8000; n++)
      check_one(WIDTH'($urandom), WIDTH'($urandom), alu_op_e'($urandom_range(NUM_OPS-1)),
                1'($urandom));

    for (int o = 0; o < NUM_OPS; o++) begin
      op = alu_op_e'(o);
      require({"operation ", op.name()}, op_count[o]);
    end
    require("carry out of addition", n_carry_out);
    require("borrow out of subtraction", n_borrow_out);
    require("carry in to addition", n_carry_in);
    require("borrow in to subtraction", n_borrow_in);
    require("product upper half", n_prod_hi);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
