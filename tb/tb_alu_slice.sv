// tb_alu_slice: exhaustive self-check of the 1-bit ALU slice, both
// architectures.
//
// For every (M, S1S0, A, B, Cin): in arithmetic mode (M=0) F must be the sum
// bit of A + operand + Cin (operand 1, 0, B', B for S1S0 = 00..11); in logic
// mode (M=1) F must be the architecture's logic function for S1S0. Cout must
// be the adder's carry in both modes.
module tb_alu_slice;
  import rev_alu_pkg::*;
  logic [1:0] s;
  logic       a, b, cin, m;
  logic       f1, c1, f2, c2;
  int         checks = 0, failures = 0;

  alu_slice #(.ARCH(ARCH1)) dut1 (.a(a), .b(b), .s(s), .cin(cin), .m(m), .f(f1), .cout(c1));
  alu_slice #(.ARCH(ARCH2)) dut2 (.a(a), .b(b), .s(s), .cin(cin), .m(m), .f(f2), .cout(c2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   y, tot;
    logic l1, l2, wf1, wf2;
    for (int v = 0; v < 64; v++) begin
      {m, s, a, b, cin} = v[5:0];
      #1;
      case (s)
        2'b00:   begin y = 1;              l1 = a | b; l2 = a ^ b; end
        2'b01:   begin y = 0;              l1 = a & b; l2 = a & b; end
        2'b10:   begin y = b ? 0 : 1;      l1 = ~a;    l2 = ~a;    end
        default: begin y = int'(b);        l1 = a ^ b; l2 = a | b; end
      endcase
      tot = int'(a) + y + int'(cin);
      wf1 = m ? l1 : tot[0];
      wf2 = m ? l2 : tot[0];
      checks += 2;
      if (f1 !== wf1 || c1 !== tot[1]) begin
        failures++;
        $display("FAIL arch1 m=%b s=%b a=%b b=%b cin=%b got f=%b c=%b", m, s, a, b, cin, f1, c1);
      end
      if (f2 !== wf2 || c2 !== tot[1]) begin
        failures++;
        $display("FAIL arch2 m=%b s=%b a=%b b=%b cin=%b got f=%b c=%b", m, s, a, b, cin, f2, c2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
