// rev_feynman_gate: the 2x2 Feynman (controlled-NOT) reversible gate.
//
// Maps (A, B) to (P, Q) with P = A and Q = A xor B; the mapping is its own
// inverse. With B tied to 0 the gate copies A onto Q, which is how a signal
// is fanned out in a reversible circuit, where plain fan-out is not allowed.
// Quantum cost 1. Purely combinational; no clock.
module rev_feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
