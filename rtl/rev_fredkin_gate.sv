// rev_fredkin_gate: the 3x3 Fredkin (controlled-swap) reversible gate.
//
// Maps (A, B, C) to (P, Q, R) with P = A, Q = A'B xor AC and R = A'C xor AB:
// when A is 0 the lines B and C pass straight through, when A is 1 they are
// swapped. The gate is conservative (it keeps the number of ones) and has a
// quantum cost of 5. Used with a constant on one line it gives AND (C = 0,
// output R), OR (C = 1, output Q) and a 2:1 multiplexer (output Q selects
// C when A = 1, else B). Purely combinational; no clock.
module rev_fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
