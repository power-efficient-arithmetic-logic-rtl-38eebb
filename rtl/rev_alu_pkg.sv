// rev_alu_pkg: shared types for the reversible-gate ALU.
//
// arch_e names the two slice architectures. ARCH1 builds the adder from one
// Peres Full Adder Gate and the logic unit from a URG and a Feynman gate;
// ARCH2 builds the adder from two Peres gates and the logic unit from a Peres
// and a Toffoli gate. Both share the Fredkin-gate multiplexers.
//
// The select encodings below are read from the multiplexer wiring of the two
// architecture drawings. The arithmetic encoding and the mode bit are common
// to both; the logic encodings differ in where OR and XOR sit.
package rev_alu_pkg;

  typedef enum logic {
    ARCH1 = 1'b0,  // PFAG adder, URG + Feynman logic unit
    ARCH2 = 1'b1   // two-Peres adder, Peres + Toffoli logic unit
  } arch_e;

  // Mode bit M of the output multiplexer.
  localparam logic MODE_ARITH = 1'b0;
  localparam logic MODE_LOGIC = 1'b1;

  // Arithmetic unit: S1S0 selects the adder's second operand Y.
  //   result = A + Y + Cin
  localparam logic [1:0] AU_ONES = 2'b00;  // Y = all ones: A-1 (Cin=0), A (Cin=1)
  localparam logic [1:0] AU_ZERO = 2'b01;  // Y = 0:        A (Cin=0),   A+1 (Cin=1)
  localparam logic [1:0] AU_BINV = 2'b10;  // Y = ~B:       A+~B,        A-B
  localparam logic [1:0] AU_B    = 2'b11;  // Y = B:        A+B,         A+B+1

  // Logic unit of ARCH1.
  localparam logic [1:0] LU1_OR   = 2'b00;
  localparam logic [1:0] LU1_AND  = 2'b01;
  localparam logic [1:0] LU1_NOTA = 2'b10;
  localparam logic [1:0] LU1_XOR  = 2'b11;

  // Logic unit of ARCH2.
  localparam logic [1:0] LU2_XOR  = 2'b00;
  localparam logic [1:0] LU2_AND  = 2'b01;
  localparam logic [1:0] LU2_NOTA = 2'b10;
  localparam logic [1:0] LU2_OR   = 2'b11;

endpackage
