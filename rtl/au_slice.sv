// au_slice: 1-bit arithmetic unit from reversible gates.
//
// A 4:1 Fredkin multiplexer chooses the adder's second operand Y from the
// constants 1 and 0, the inverted B and B itself; a reversible full adder
// then forms A + Y + Cin. With the carry rippled across slices this gives
// every arithmetic micro-operation of the ALU:
//   S1S0 = 00: Y = 1   -> A-1 (Cin=0), A     (Cin=1)
//   S1S0 = 01: Y = 0   -> A   (Cin=0), A+1   (Cin=1)
//   S1S0 = 10: Y = B'  -> A+B'(Cin=0), A-B   (Cin=1)
//   S1S0 = 11: Y = B   -> A+B (Cin=0), A+B+1 (Cin=1)
// The order of the multiplexer inputs follows the architecture drawings.
// ARCH selects the adder: ARCH1 the single-PFAG adder, ARCH2 the two-Peres
// adder. The inverter on B is an ordinary NOT, as drawn.
// Purely combinational.
module au_slice
  import rev_alu_pkg::*;
#(
  parameter arch_e ARCH = ARCH1
) (
  input  logic       a,
  input  logic       b,
  input  logic [1:0] s,     // {S1, S0}
  input  logic       cin,
  output logic       sum,
  output logic       cout
);
  logic [3:0] operand;   // multiplexer data inputs, indexed by select code
  logic       y;

  always_comb begin
    operand          = '0;
    operand[AU_ONES] = 1'b1;
    operand[AU_ZERO] = 1'b0;
    operand[AU_BINV] = ~b;
    operand[AU_B]    = b;
  end

  mux4_fredkin u_mux (.s(s), .i(operand), .y(y));

  if (ARCH == ARCH1) begin : g_pfag
    fa_pfag   u_fa (.a(a), .b(y), .cin(cin), .sum(sum), .cout(cout));
  end else begin : g_peres
    fa_peres2 u_fa (.a(a), .b(y), .cin(cin), .sum(sum), .cout(cout));
  end
endmodule
