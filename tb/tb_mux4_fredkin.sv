// tb_mux4_fredkin: exhaustive self-check of the three-Fredkin 4:1 mux.
//
// For every select value and every one of the sixteen data patterns, the
// output must be data bit number {S1,S0}.
module tb_mux4_fredkin;
  logic [1:0] s;
  logic [3:0] i;
  logic       y;
  int         checks = 0, failures = 0;

  mux4_fredkin dut (.s(s), .i(i), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {s, i} = v[5:0];
      #1;
      checks++;
      if (y !== i[s]) begin
        failures++;
        $display("FAIL s=%b i=%b got y=%b", s, i, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
