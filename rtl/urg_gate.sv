// urg_gate: the 3x3 Universal Reversible Gate (URG).
//
// P = (A + B) xor C, Q = B, R = AB xor C. With C = 0 it yields A OR B on P
// and A AND B on R in one gate. Purely combinational; no clock.
module urg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = (a | b) ^ c;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
