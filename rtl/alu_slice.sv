// alu_slice: 1-bit ALU slice from reversible gates.
//
// The arithmetic unit (au_slice) and the logic unit (lu_urg_fng for ARCH1,
// lu_pg_tg for ARCH2) work in parallel on the same A, B and S1S0; a Fredkin
// 2:1 multiplexer controlled by the mode bit M passes the arithmetic sum
// (M=0) or the logic result (M=1) to F. The carry out comes straight from
// the adder in both modes, so a chain of slices ripples its carry whatever
// M is. The structure follows the published block diagram and the two
// architecture drawings; the placement of the arithmetic result on the
// M=0 input is taken from their input order. Purely combinational.
module alu_slice
  import rev_alu_pkg::*;
#(
  parameter arch_e ARCH = ARCH1
) (
  input  logic       a,
  input  logic       b,
  input  logic [1:0] s,     // {S1, S0}
  input  logic       cin,
  input  logic       m,     // MODE_ARITH or MODE_LOGIC
  output logic       f,
  output logic       cout
);
  logic x, y;        // arithmetic and logic results

  au_slice #(.ARCH(ARCH)) u_au (.a(a), .b(b), .s(s), .cin(cin), .sum(x), .cout(cout));

  if (ARCH == ARCH1) begin : g_lu1
    lu_urg_fng u_lu (.a(a), .b(b), .s(s), .o(y));
  end else begin : g_lu2
    lu_pg_tg   u_lu (.a(a), .b(b), .s(s), .o(y));
  end

  mux2_fredkin u_out (.s(m), .i0(x), .i1(y), .y(f));
endmodule
