// tb_lu_urg_fng: exhaustive self-check of the architecture-1 logic unit (URG + Feynman).
//
// For every select value and every (A, B) the output must be the logic
// function that select code names: 00 OR, 01 AND, 10 NOT A, 11 XOR.
module tb_lu_urg_fng;
  import rev_alu_pkg::*;
  logic [1:0] s;
  logic       a, b, o, want;
  int         checks = 0, failures = 0;

  lu_urg_fng dut (.a(a), .b(b), .s(s), .o(o));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {s, a, b} = v[3:0];
      #1;
      case (s)
        LU1_OR: want = a | b;
        LU1_AND: want = a & b;
        LU1_NOTA: want = ~a;
        default: want = a ^ b;
      endcase
      checks++;
      if (o !== want) begin
        failures++;
        $display("FAIL s=%b a=%b b=%b got %b want %b", s, a, b, o, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
