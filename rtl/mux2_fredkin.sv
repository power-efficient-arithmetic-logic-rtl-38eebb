// mux2_fredkin: 2:1 multiplexer made of one Fredkin gate.
//
// The select drives the Fredkin control line, I0 and I1 the other two lines;
// the middle output is S'I0 + SI1. The other two outputs are garbage.
// Purely combinational.
module mux2_fredkin (
  input  logic s,
  input  logic i0,
  input  logic i1,
  output logic y
);
  logic g1, g2;      // garbage outputs

  fredkin_gate u_fg (.a(s), .b(i0), .c(i1), .p(g1), .q(y), .r(g2));
endmodule
