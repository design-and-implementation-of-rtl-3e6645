// rev_not_gate: the 1x1 reversible NOT gate.
//
// The single output is the complement of the single input, P = A'. It is the
// only conventional gate that is already reversible, and it has a quantum cost
// of zero. Purely combinational; no clock.
module rev_not_gate (
  input  logic a,
  output logic p
);
  assign p = ~a;
endmodule
