// lu_urg_fng: 1-bit logic unit of architecture 1 (URG and Feynman gates).
//
// A URG fed (A, B, 0) gives A+B on its first output and AB on its third; a
// Feynman gate fed (A, B) gives A and A xor B, and a NOT turns A into A'.
// A 4:1 Fredkin multiplexer picks the result:
//   S1S0 = 00: A OR B, 01: A AND B, 10: NOT A, 11: A XOR B.
// Purely combinational.
module lu_urg_fng
  import rev_alu_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic [1:0] s,     // {S1, S0}
  output logic       o
);
  logic g1;          // garbage output
  logic a_or_b, a_and_b, a_pass, a_xor_b;

  urg_gate     u_urg (.a(a), .b(b), .c(1'b0), .p(a_or_b), .q(g1), .r(a_and_b));
  feynman_gate u_fng (.a(a), .b(b), .p(a_pass), .q(a_xor_b));

  logic [3:0] fn;    // multiplexer data inputs, indexed by select code

  always_comb begin
    fn           = '0;
    fn[LU1_OR]   = a_or_b;
    fn[LU1_AND]  = a_and_b;
    fn[LU1_NOTA] = ~a_pass;
    fn[LU1_XOR]  = a_xor_b;
  end

  mux4_fredkin u_mux (.s(s), .i(fn), .y(o));
endmodule
