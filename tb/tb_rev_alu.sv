// tb_rev_alu: self-check of the WIDTH-bit ALU, both architectures, at the
// default 8 bits and at 4 bits.
//
// Every micro-operation is applied to corner operands (0, 1, all ones, the
// sign bit) and to random operand pairs. The result must match the integer
// reference in alu_ref_pkg; for arithmetic operations the carry out must be
// bit WIDTH of the integer sum, which exercises the full ripple chain. The
// 4-bit pair is checked on all 256 operand pairs of every operation.
module tb_rev_alu;
  import rev_alu_pkg::*;
  import alu_ref_pkg::*;
  localparam int W = 8;
  localparam int RANDOM_PAIRS = 300;

  logic [W-1:0] a, b, f1, f2;
  logic [1:0]   s1, s2;
  logic         cin1, cin2, m1, m2, c1, c2;
  int           checks = 0, failures = 0;

  localparam int W4 = 4;
  logic [W4-1:0] a4, b4, f41, f42;
  logic          c41, c42;

  rev_alu #(.WIDTH(W), .ARCH(ARCH1)) dut1 (.a(a), .b(b), .s(s1), .cin(cin1), .m(m1), .f(f1), .cout(c1));
  rev_alu #(.WIDTH(W), .ARCH(ARCH2)) dut2 (.a(a), .b(b), .s(s2), .cin(cin2), .m(m2), .f(f2), .cout(c2));

  rev_alu #(.WIDTH(W4), .ARCH(ARCH1)) dut41 (.a(a4), .b(b4), .s(s1), .cin(cin1), .m(m1), .f(f41), .cout(c41));
  rev_alu #(.WIDTH(W4), .ARCH(ARCH2)) dut42 (.a(a4), .b(b4), .s(s2), .cin(cin2), .m(m2), .f(f42), .cout(c42));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(op_e op, logic [W-1:0] va, logic [W-1:0] vb);
    longint unsigned want;
    a = va;
    b = vb;
    {m1, s1, cin1} = controls(op, ARCH1);
    {m2, s2, cin2} = controls(op, ARCH2);
    #1;
    want = expect_result(op, longint'(va), longint'(vb), W);
    checks += 2;
    if (f1 !== want[W-1:0] || (is_arith(op) && c1 !== want[W])) begin
      failures++;
      $display("FAIL arch1 %s a=%h b=%h got %b_%h want %h", op.name(), va, vb, c1, f1, want);
    end
    if (f2 !== want[W-1:0] || (is_arith(op) && c2 !== want[W])) begin
      failures++;
      $display("FAIL arch2 %s a=%h b=%h got %b_%h want %h", op.name(), va, vb, c2, f2, want);
    end
  endtask

  task automatic apply4(op_e op, logic [W4-1:0] va, logic [W4-1:0] vb);
    longint unsigned want;
    a4 = va;
    b4 = vb;
    {m1, s1, cin1} = controls(op, ARCH1);
    {m2, s2, cin2} = controls(op, ARCH2);
    #1;
    want = expect_result(op, longint'(va), longint'(vb), W4);
    checks += 2;
    if (f41 !== want[W4-1:0] || (is_arith(op) && c41 !== want[W4])) begin
      failures++;
      $display("FAIL 4-bit arch1 %s a=%h b=%h got %b_%h want %h", op.name(), va, vb, c41, f41, want);
    end
    if (f42 !== want[W4-1:0] || (is_arith(op) && c42 !== want[W4])) begin
      failures++;
      $display("FAIL 4-bit arch2 %s a=%h b=%h got %b_%h want %h", op.name(), va, vb, c42, f42, want);
    end
  endtask

  initial begin
    logic [W-1:0] corner [4];
    a4 = '0;
    b4 = '0;
    corner = '{'0, W'(1), '1, W'(1) << (W - 1)};
    for (int o = 0; o < NUM_OPS; o++) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          apply(op_e'(o), corner[i], corner[j]);
      for (int k = 0; k < RANDOM_PAIRS; k++)
        apply(op_e'(o), W'($urandom), W'($urandom));
      for (int va = 0; va < (1 << W4); va++)
        for (int vb = 0; vb < (1 << W4); vb++)
          apply4(op_e'(o), W4'(va), W4'(vb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
