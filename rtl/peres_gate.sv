// peres_gate: the 3x3 reversible Peres gate.
//
// P = A, Q = A xor B, R = AB xor C: a Toffoli gate followed by a Feynman
// gate on the first two lines. With C = 0 it is a half adder (Q sum, R
// carry). Purely combinational; no clock.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
