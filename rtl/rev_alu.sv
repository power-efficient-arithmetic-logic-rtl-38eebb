// rev_alu: WIDTH-bit ALU made of 1-bit reversible-gate slices.
//
// WIDTH alu_slice instances share S1S0 and M; the carry ripples from slice 0
// (which takes cin) to slice WIDTH-1, whose carry out is cout. All slices
// compute in one combinational pass; the carry path is WIDTH full adders
// long. WIDTH defaults to 8, the operand width of the simulated examples.
// The slices are specified one bit wide; chaining them by the carry is this
// design's reading of growing them into a wider word.
module rev_alu
  import rev_alu_pkg::*;
#(
  parameter int    WIDTH = 8,
  parameter arch_e ARCH  = ARCH1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [1:0]       s,     // {S1, S0}
  input  logic             cin,
  input  logic             m,     // MODE_ARITH or MODE_LOGIC
  output logic [WIDTH-1:0] f,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < WIDTH; k++) begin : g_slice
    alu_slice #(.ARCH(ARCH)) u_slice (
      .a(a[k]), .b(b[k]), .s(s), .cin(c[k]), .m(m), .f(f[k]), .cout(c[k+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
