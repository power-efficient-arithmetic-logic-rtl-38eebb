// tb_feynman_gate: exhaustive self-check of the 2x2 Feynman gate.
//
// Applies all four input patterns, compares P and Q with A and A xor B, and
// checks that the four output patterns are all different.
module tb_feynman_gate;
  logic a, b, p, q;
  int   checks = 0, failures = 0;
  bit   seen [4];

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL ab=%b%b got pq=%b%b", a, b, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %b%b repeated", p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
