// alu_ref_pkg: reference model of the ALU micro-operations, for testbenches.
//
// op_e lists the micro-operations of the ALU's function table (transfer A
// appears twice because two control codes produce it). controls() gives the
// {M, S1, S0, Cin} that select an operation on either architecture, and
// expect_result() computes the result and carry straight from the
// operation's meaning with integer arithmetic, independent of the gate
// netlist. Operands up to 63 bits wide.
package alu_ref_pkg;
  import rev_alu_pkg::*;

  typedef enum int {
    OP_TRANSFER,      // F = A           (via operand 0, Cin = 0)
    OP_TRANSFER_ALT,  // F = A           (via operand all-ones, Cin = 1)
    OP_INC,           // F = A + 1
    OP_ADD,           // F = A + B
    OP_ADDC,          // F = A + B + 1
    OP_SUBB,          // F = A + B'      (subtract with borrow)
    OP_SUB,           // F = A + B' + 1  (A - B)
    OP_DEC,           // F = A - 1
    OP_AND,
    OP_OR,
    OP_XOR,
    OP_NOT            // F = not A
  } op_e;

  localparam int NUM_OPS = 12;

  typedef struct packed {
    logic       m;
    logic [1:0] s;
    logic       cin;
  } ctrl_t;

  function automatic bit is_arith(op_e op);
    return op < OP_AND;
  endfunction

  function automatic ctrl_t controls(op_e op, arch_e arch);
    ctrl_t c;
    c = '0;
    case (op)
      OP_TRANSFER:     c = '{1'b0, 2'b01, 1'b0};
      OP_TRANSFER_ALT: c = '{1'b0, 2'b00, 1'b1};
      OP_INC:          c = '{1'b0, 2'b01, 1'b1};
      OP_ADD:          c = '{1'b0, 2'b11, 1'b0};
      OP_ADDC:         c = '{1'b0, 2'b11, 1'b1};
      OP_SUBB:         c = '{1'b0, 2'b10, 1'b0};
      OP_SUB:          c = '{1'b0, 2'b10, 1'b1};
      OP_DEC:          c = '{1'b0, 2'b00, 1'b0};
      OP_AND:          c = '{1'b1, 2'b01, 1'b0};
      OP_NOT:          c = '{1'b1, 2'b10, 1'b0};
      OP_OR:           c = '{1'b1, (arch == ARCH1) ? 2'b00 : 2'b11, 1'b0};
      OP_XOR:          c = '{1'b1, (arch == ARCH1) ? 2'b11 : 2'b00, 1'b0};
      default:         c = '0;
    endcase
    return c;
  endfunction

  // Result in bits [width-1:0], carry out of the addition in bit [width]
  // (zero for logic operations, whose carry is not checked).
  function automatic longint unsigned expect_result(op_e op, longint unsigned a,
                                                    longint unsigned b, int width);
    longint unsigned mask, ones, nb, r;
    mask = (64'd1 << width) - 1;
    ones = mask;
    nb   = ~b & mask;
    a    = a & mask;
    b    = b & mask;
    case (op)
      OP_TRANSFER:     r = a;
      OP_TRANSFER_ALT: r = a + ones + 1;
      OP_INC:          r = a + 1;
      OP_ADD:          r = a + b;
      OP_ADDC:         r = a + b + 1;
      OP_SUBB:         r = a + nb;
      OP_SUB:          r = a + nb + 1;
      OP_DEC:          r = a + ones;
      OP_AND:          r = a & b;
      OP_OR:           r = a | b;
      OP_XOR:          r = a ^ b;
      default:         r = ~a & mask;
    endcase
    return r & ((mask << 1) | 1);
  endfunction
endpackage
