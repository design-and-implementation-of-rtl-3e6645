// rev_jrc_gate: the 5x5 reversible JRC gate, a one-bit full adder or full
// subtractor chosen by its control input.
//
// Inputs A, B, C, D, Sel; outputs P, Q, R, S, T. With D = 0 the gate acts as
// a full adder when Sel = 0 (Q = A + B + C sum bit, S = carry out) and as a
// full subtractor when Sel = 1 (Q = A - B - C difference bit, S = borrow
// out). The five ports and the adder/subtractor behaviour follow the design;
// the output equations are this implementation's own, chosen so that the
// 5-bit mapping is one-to-one:
//   P = A
//   Q = A xor B xor C                       (sum / difference)
//   R = C
//   S = D xor MAJ(A xor Sel, B, C)          (carry / borrow when D = 0)
//   T = Sel
// The borrow of A - B - C is MAJ(A', B, C) and the carry of A + B + C is
// MAJ(A, B, C), so flipping A by Sel inside the majority gives both. The
// mapping is reversible because it is a sequence of controlled XORs, each
// onto a line that none of its own controls depends on. P, R and T are
// garbage outputs in the adder/subtractor. Purely combinational; no clock.
module rev_jrc_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic sel,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);
  logic a_eff;

  assign a_eff = a ^ sel;
  assign p = a;
  assign q = a ^ b ^ c;
  assign r = c;
  assign s = d ^ ((a_eff & b) | (a_eff & c) | (b & c));
  assign t = sel;
endmodule
