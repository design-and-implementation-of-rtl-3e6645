// rev_alu: 16-bit reversible arithmetic logic unit (top level).
//
// Operands A and B feed three units that all compute at the same time: a
// ripple adder/subtractor made of JRC gates (rev_addsub), an array multiplier
// (rev_multiplier) and a logic unit giving AND, OR, NOT, XOR and NAND
// (rev_logic_unit). The 3-bit select S2..S0 (port SEL) then picks one of the
// eight results for the outputs (rev_result_select). Every gate inside is one
// of the reversible NOT, Feynman, Fredkin or JRC gates.
//
// Ports: A, B and F are WIDTH bits (16 by default), CIN is the carry in for
// addition and the borrow in for subtraction, COUT is the carry out or borrow
// out of those two operations and 0 for the others. F_HI carries the upper
// half of the 2*WIDTH-bit product for multiplication and is 0 otherwise.
// Operation codes are in rev_alu_pkg (ADD 000, SUB 001, MUL 010, AND 011,
// OR 100, NOT 101, XOR 110, NAND 111).
//
// Timing: fully combinational, no clock or reset; the outputs settle one
// combinational delay after the inputs change, the multiplier's path being
// the longest.
//
// Following the design: the 16-bit width, the eight operations, the select
// S2..S0 with Cin and Cout, the adder/subtractor as a chain of one JRC gate per
// bit whose select line chooses add or subtract. This implementation's own
// choices: the operation codes, the F_HI port, the structure of the
// multiplier, logic unit and result selector, and the JRC gate equations.
// The adder/subtractor's add/subtract line is driven high only for the SUB
// code, so it adds whenever any other operation is selected.
module rev_alu
  import rev_alu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          sel,
  input  logic             cin,
  output logic [WIDTH-1:0] f,
  output logic [WIDTH-1:0] f_hi,
  output logic             cout
);
  localparam int unsigned RW = 2 * WIDTH + 1;  // {cout, f_hi, f}

  logic [WIDTH-1:0]   as_sum;
  logic               as_cout;
  logic               as_sub;
  logic [2*WIDTH-1:0] prod;
  logic [WIDTH-1:0]   and_w, or_w, not_w, xor_w, nand_w;
  logic [RW-1:0]      res [8];
  logic [RW-1:0]      y;

  assign as_sub = (sel == OP_SUB);

  rev_addsub #(.WIDTH(WIDTH)) u_addsub (
    .a   (a),
    .b   (b),
    .cin (cin),
    .sub (as_sub),
    .sum (as_sum),
    .cout(as_cout)
  );

  rev_multiplier #(.WIDTH(WIDTH)) u_mult (
    .a   (a),
    .b   (b),
    .prod(prod)
  );

  rev_logic_unit #(.WIDTH(WIDTH)) u_logic (
    .a     (a),
    .b     (b),
    .and_o (and_w),
    .or_o  (or_w),
    .not_o (not_w),
    .xor_o (xor_w),
    .nand_o(nand_w)
  );

  localparam logic [WIDTH-1:0] ZERO = '0;

  assign res[OP_ADD]  = {as_cout, ZERO, as_sum};
  assign res[OP_SUB]  = {as_cout, ZERO, as_sum};
  assign res[OP_MUL]  = {1'b0, prod};
  assign res[OP_AND]  = {1'b0, ZERO, and_w};
  assign res[OP_OR]   = {1'b0, ZERO, or_w};
  assign res[OP_NOT]  = {1'b0, ZERO, not_w};
  assign res[OP_XOR]  = {1'b0, ZERO, xor_w};
  assign res[OP_NAND] = {1'b0, ZERO, nand_w};

  rev_result_select #(.W(RW)) u_select (
    .res_in(res),
    .sel   (sel),
    .y     (y)
  );

  assign f    = y[WIDTH-1:0];
  assign f_hi = y[2*WIDTH-1:WIDTH];
  assign cout = y[2*WIDTH];
endmodule
