// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//
// P passes A through and Q is A xor B, a one-to-one map of the four input
// patterns. Purely combinational; no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
