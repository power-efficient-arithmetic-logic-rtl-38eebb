// fa_pfag: 1-bit full adder built from a single Peres Full Adder Gate.
//
// The gate takes (A, B, Cin, 0); its third output is the sum and its fourth
// the carry. Its first two outputs (A and A xor B) are garbage. (The
// published architecture-1 drawing routes the third output to the carry
// out; the gate's own definition, third = sum, fourth = carry, is followed
// here, since the other way round would not add.) Purely combinational.
module fa_pfag (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic g1, g2;      // garbage outputs

  pfag_gate u_pfag (.a(a), .b(b), .c(cin), .d(1'b0),
                    .p(g1), .q(g2), .r(sum), .s(cout));
endmodule
