// tb_mux2_fredkin: exhaustive self-check of the one-Fredkin 2:1 multiplexer.
//
// For all eight (S, I0, I1) the output must be I0 when S is 0 and I1 when S
// is 1.
module tb_mux2_fredkin;
  logic s, i0, i1, y;
  int   checks = 0, failures = 0;

  mux2_fredkin dut (.s(s), .i0(i0), .i1(i1), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, i0, i1} = v[2:0];
      #1;
      checks++;
      if (y !== (s ? i1 : i0)) begin
        failures++;
        $display("FAIL s=%b i0=%b i1=%b got y=%b", s, i0, i1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
