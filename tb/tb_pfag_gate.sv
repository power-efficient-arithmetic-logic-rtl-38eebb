// tb_pfag_gate: exhaustive self-check of the 4x4 Peres Full Adder Gate.
//
// Applies all sixteen input patterns. With D = 0 the third and fourth
// outputs must equal the sum and carry of A + B + C counted as integers;
// P and Q must be A and A xor B; with D = 1 the fourth output is the
// inverted carry. All sixteen output patterns must differ.
module tb_pfag_gate;
  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;
  bit   seen [16];

  pfag_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = v[3:0];
      #1;
      tot = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== (a != b) || r !== tot[0] || s !== (tot[1] != d)) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b got pqrs=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b%b%b%b repeated", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
