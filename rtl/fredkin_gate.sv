// fredkin_gate: the 3x3 reversible Fredkin (controlled-swap) gate.
//
// A is the control and passes through as P. When A is 0, B goes to Q and C
// to R; when A is 1 they are swapped: Q = A'B + AC, R = AB + A'C. Used as a
// 2:1 multiplexer by taking Q. Purely combinational; no clock.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (a & b) | (~a & c);
endmodule
