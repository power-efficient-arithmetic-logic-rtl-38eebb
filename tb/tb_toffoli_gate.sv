// tb_toffoli_gate: exhaustive self-check of the 3x3 Toffoli gate.
//
// Applies all eight input patterns, compares each output with the gate's
// defining equation written out here, and checks that the eight output
// patterns are all different (the gate is one-to-one, i.e. reversible).
module tb_toffoli_gate;
  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  bit   seen [8];

  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ep, eq, er;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = v[2:0];
      #1;
      ep = a;
      eq = b;
      er = (a && b) ? !c : c;
      checks++;
      if ({p, q, r} !== {ep, eq, er}) begin
        failures++;
        $display("FAIL abc=%b%b%b got pqr=%b%b%b want %b%b%b", a, b, c, p, q, r, ep, eq, er);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b repeated: not one-to-one", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
