// rev_alu_top: the two reversible-gate ALU architectures side by side.
//
// Both WIDTH-bit ALUs see the same operands A and B, select S1S0, carry in
// and mode M, and each drives its own result and carry out:
//   architecture 1: PFAG adder, URG + Feynman logic unit
//   architecture 2: two-Peres adder, Peres + Toffoli logic unit
// The arithmetic results are identical. In logic mode the two differ in
// encoding only: S1S0 = 00 is OR on architecture 1 and XOR on architecture
// 2, and 11 the reverse. Purely combinational: results are valid one
// ripple-carry delay after the inputs settle.
module rev_alu_top
  import rev_alu_pkg::*;
#(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [1:0]       s,
  input  logic             cin,
  input  logic             m,
  output logic [WIDTH-1:0] f_arch1,
  output logic             cout_arch1,
  output logic [WIDTH-1:0] f_arch2,
  output logic             cout_arch2
);
  rev_alu #(.WIDTH(WIDTH), .ARCH(ARCH1)) u_arch1 (
    .a(a), .b(b), .s(s), .cin(cin), .m(m), .f(f_arch1), .cout(cout_arch1)
  );

  rev_alu #(.WIDTH(WIDTH), .ARCH(ARCH2)) u_arch2 (
    .a(a), .b(b), .s(s), .cin(cin), .m(m), .f(f_arch2), .cout(cout_arch2)
  );
endmodule
