// rev_logic_unit: the logic unit of the reversible ALU, giving AND, OR, NOT,
// XOR and NAND of two WIDTH-bit words at once, every bit built from
// reversible gates.
//
// Per bit:
//   AND  = Fredkin(A, B, 0), output R  (A'.0 xor A.B = AB)
//   OR   = Fredkin(A, B, 1), output Q  (A'B xor A.1 = A + B)
//   XOR  = Feynman(A, B),    output Q
//   NOT  = NOT(A)
//   NAND = NOT(AND)
// Because a reversible circuit may not fan a line out directly, the extra
// copies of A and B that these gates need are made with Feynman gates whose
// second input is 0. The five functions follow the design; which gate makes
// each of them, and that NOT acts on operand A, are this implementation's
// own choices. All outputs are combinational and valid together.
module rev_logic_unit #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] and_o,
  output logic [WIDTH-1:0] or_o,
  output logic [WIDTH-1:0] not_o,
  output logic [WIDTH-1:0] xor_o,
  output logic [WIDTH-1:0] nand_o
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    // Copies of the operand bits, one per gate that reads them.
    logic a_and, a_or, a_xor, a_not, a_t1, a_t2;
    logic b_and, b_or, b_xor, b_t1;
    // AND result, read by both the AND output and the NAND gate.
    logic and_bit;
    // Garbage outputs.
    logic g_and_p, g_and_q, g_or_p, g_or_r, g_xor_p;

    // Fan-out: A into four lines (three Feynman gates), B into three (two).
    rev_feynman_gate u_fan_a0 (.a(a[i]), .b(1'b0), .p(a_and), .q(a_t1));
    rev_feynman_gate u_fan_a1 (.a(a_t1), .b(1'b0), .p(a_or),  .q(a_t2));
    rev_feynman_gate u_fan_a2 (.a(a_t2), .b(1'b0), .p(a_xor), .q(a_not));
    rev_feynman_gate u_fan_b0 (.a(b[i]), .b(1'b0), .p(b_and), .q(b_t1));
    rev_feynman_gate u_fan_b1 (.a(b_t1), .b(1'b0), .p(b_or),  .q(b_xor));

    rev_fredkin_gate u_and (.a(a_and), .b(b_and), .c(1'b0),
                            .p(g_and_p), .q(g_and_q), .r(and_bit));
    rev_fredkin_gate u_or  (.a(a_or), .b(b_or), .c(1'b1),
                            .p(g_or_p), .q(or_o[i]), .r(g_or_r));
    rev_feynman_gate u_xor (.a(a_xor), .b(b_xor), .p(g_xor_p), .q(xor_o[i]));
    rev_not_gate     u_not (.a(a_not), .p(not_o[i]));
    rev_not_gate     u_nand (.a(and_bit), .p(nand_o[i]));

    assign and_o[i] = and_bit;
  end
endmodule
