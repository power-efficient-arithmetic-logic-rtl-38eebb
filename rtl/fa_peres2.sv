// fa_peres2: 1-bit full adder built from two Peres gates.
//
// The first Peres gate takes (A, B, 0) and produces A xor B and AB. The
// second takes (A xor B, Cin, AB): its Q output is A xor B xor Cin, the sum,
// and its R output is (A xor B)Cin xor AB, the carry. The two pass-through
// outputs (A and A xor B) are garbage. The gate wiring follows the
// published two-Peres adder. Purely combinational.
module fa_peres2 (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic g1, g2;      // garbage outputs
  logic axb, ab;

  peres_gate u_pg1 (.a(a),   .b(b),   .c(1'b0), .p(g1), .q(axb), .r(ab));
  peres_gate u_pg2 (.a(axb), .b(cin), .c(ab),   .p(g2), .q(sum), .r(cout));
endmodule
