// pfag_gate: the 4x4 Peres Full Adder Gate (PFAG).
//
// P = A, Q = A xor B, R = A xor B xor C, S = ((A xor B)C xor AB) xor D.
// With D = 0, R is the full-adder sum of A, B, C and S its carry. The xor
// with D on S is this design's reading that keeps the gate one-to-one; the
// adder only ever drives D with 0, where it makes no difference.
// Purely combinational; no clock.
module pfag_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic axb;
  assign axb = a ^ b;
  assign p   = a;
  assign q   = axb;
  assign r   = axb ^ c;
  assign s   = ((axb & c) ^ (a & b)) ^ d;
endmodule
