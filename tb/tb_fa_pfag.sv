// tb_fa_pfag: exhaustive self-check of the single-PFAG full adder.
//
// For all eight (A, B, Cin) the {Cout, Sum} pair must equal A + B + Cin
// counted as an integer.
module tb_fa_pfag;
  logic a, b, cin, sum, cout;
  int   checks = 0, failures = 0;

  fa_pfag dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot;
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = v[2:0];
      #1;
      tot = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, sum} !== tot[1:0]) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b got cout,sum=%b%b want %0d", a, b, cin, cout, sum, tot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
