// toffoli_gate: the 3x3 reversible Toffoli gate.
//
// A and B pass through as P and Q; R is C inverted when both A and B are 1,
// otherwise C (R = AB xor C). Purely combinational; no clock.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
