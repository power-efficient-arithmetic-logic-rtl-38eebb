// lu_pg_tg: 1-bit logic unit of architecture 2 (Peres and Toffoli gates).
//
// A Peres gate fed (A, B, 0) gives A xor B and AB. A Toffoli gate fed
// (A', B', 1) passes A' through and gives 1 xor A'B' = A + B. A 4:1 Fredkin
// multiplexer picks the result, in the input order of the architecture-2
// drawings:
//   S1S0 = 00: A XOR B, 01: A AND B, 10: NOT A, 11: A OR B.
// Note that OR and XOR swap codes relative to architecture 1. The published
// text gives both logic units one common encoding (that of architecture 1),
// while both drawings of this unit place the inputs as above; the drawings
// are followed. One drawing also puts an inverter after the Toffoli gate's
// first output; since that output is already A', no inverter is used and
// the multiplexer receives NOT A, as the other drawing shows.
// Purely combinational.
module lu_pg_tg
  import rev_alu_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic [1:0] s,     // {S1, S0}
  output logic       o
);
  logic g1, g2;      // garbage outputs
  logic a_xor_b, a_and_b, a_n, a_or_b;

  peres_gate   u_pg (.a(a),  .b(b),  .c(1'b0), .p(g1),  .q(a_xor_b), .r(a_and_b));
  toffoli_gate u_tg (.a(~a), .b(~b), .c(1'b1), .p(a_n), .q(g2),      .r(a_or_b));

  logic [3:0] fn;    // multiplexer data inputs, indexed by select code

  always_comb begin
    fn           = '0;
    fn[LU2_XOR]  = a_xor_b;
    fn[LU2_AND]  = a_and_b;
    fn[LU2_NOTA] = a_n;
    fn[LU2_OR]   = a_or_b;
  end

  mux4_fredkin u_mux (.s(s), .i(fn), .y(o));
endmodule
