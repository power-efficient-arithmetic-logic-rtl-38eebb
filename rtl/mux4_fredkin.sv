// mux4_fredkin: 4:1 multiplexer made of three Fredkin gates.
//
// Two first-level Fredkin gates controlled by S0 pick I0/I1 and I2/I3:
//   A = S0'I0 + S0I1,  B = S0'I2 + S0I3.
// A third Fredkin gate controlled by S1 picks between them:
//   Y = S1'S0'I0 + S1'S0I1 + S1S0'I2 + S1S0I3.
// Six outputs are garbage. Purely combinational.
module mux4_fredkin (
  input  logic [1:0] s,    // {S1, S0}
  input  logic [3:0] i,    // i[k] is selected when s == k
  output logic       y
);
  logic lo, hi;

  mux2_fredkin u_lo  (.s(s[0]), .i0(i[0]), .i1(i[1]), .y(lo));
  mux2_fredkin u_hi  (.s(s[0]), .i0(i[2]), .i1(i[3]), .y(hi));
  mux2_fredkin u_top (.s(s[1]), .i0(lo),   .i1(hi),   .y(y));
endmodule
