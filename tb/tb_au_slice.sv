// tb_au_slice: exhaustive self-check of the 1-bit arithmetic unit, both
// architectures.
//
// Each select code names the adder's second operand (00: 1, 01: 0, 10: B',
// 11: B); for every (S1S0, A, B, Cin) the {Cout, Sum} of each architecture
// must equal A + operand + Cin counted as an integer.
module tb_au_slice;
  import rev_alu_pkg::*;
  logic [1:0] s;
  logic       a, b, cin;
  logic       sum1, cout1, sum2, cout2;
  int         checks = 0, failures = 0;

  au_slice #(.ARCH(ARCH1)) dut1 (.a(a), .b(b), .s(s), .cin(cin), .sum(sum1), .cout(cout1));
  au_slice #(.ARCH(ARCH2)) dut2 (.a(a), .b(b), .s(s), .cin(cin), .sum(sum2), .cout(cout2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int y, tot;
    for (int v = 0; v < 32; v++) begin
      {s, a, b, cin} = v[4:0];
      #1;
      case (s)
        2'b00:   y = 1;
        2'b01:   y = 0;
        2'b10:   y = b ? 0 : 1;
        default: y = int'(b);
      endcase
      tot = int'(a) + y + int'(cin);
      checks += 2;
      if ({cout1, sum1} !== tot[1:0]) begin
        failures++;
        $display("FAIL arch1 s=%b a=%b b=%b cin=%b got %b%b want %0d", s, a, b, cin, cout1, sum1, tot);
      end
      if ({cout2, sum2} !== tot[1:0]) begin
        failures++;
        $display("FAIL arch2 s=%b a=%b b=%b cin=%b got %b%b want %0d", s, a, b, cin, cout2, sum2, tot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
