// tb_rev_alu_top: end-to-end self-check of both ALU architectures at the
// default width (8 bits), with every micro-operation of the function table
// applied to every pair of 8-bit operands.
//
// Operand A steps like a binary counter inside each operation, B steps once
// per A sweep. Each architecture's result, and its carry out for the
// arithmetic operations, is compared with the integer reference in
// alu_ref_pkg. The testbench also counts the events the design has to
// produce at least once: each micro-operation on each architecture, a carry
// out of 1 and of 0 from the ripple chain, a carry rippling through all
// eight slices (A + B with A ^ B all ones and Cin 1), and a switch of the
// mode bit M in each direction between consecutive vectors (a final phase
// of operations in random order provides those). An event never
// seen counts as a failure.
module tb_rev_alu_top;
  import rev_alu_pkg::*;
  import alu_ref_pkg::*;
  localparam int W = 8;

  logic [W-1:0] a, b, f1, f2;
  logic [1:0]   s;
  logic         cin, m, c1, c2;
  logic         m_prev;
  int           checks = 0, failures = 0;
  int           op_seen [2][NUM_OPS];
  int           carry1_seen = 0, carry0_seen = 0, full_ripple_seen = 0;
  int           to_logic_seen = 0, to_arith_seen = 0;

  rev_alu_top dut (
    .a(a), .b(b), .s(s), .cin(cin), .m(m),
    .f_arch1(f1), .cout_arch1(c1), .f_arch2(f2), .cout_arch2(c2)
  );

  initial begin : watchdog
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive one operation on one architecture's control code and check that
  // architecture's outputs (the other architecture is checked too when the
  // code means the same operation on it, i.e. for all but OR/XOR).
  task automatic apply(op_e op, arch_e arch, logic [W-1:0] va, logic [W-1:0] vb);
    longint unsigned want;
    bit              check1, check2;
    m_prev = m;
    a      = va;
    b      = vb;
    {m, s, cin} = controls(op, arch);
    #1;
    if (m_prev == 1'b0 && m == 1'b1) to_logic_seen++;
    if (m_prev == 1'b1 && m == 1'b0) to_arith_seen++;
    want   = expect_result(op, longint'(va), longint'(vb), W);
    check1 = (arch == ARCH1) || (controls(op, ARCH1) == controls(op, ARCH2));
    check2 = (arch == ARCH2) || (controls(op, ARCH1) == controls(op, ARCH2));
    if (check1) begin
      checks++;
      op_seen[0][op]++;
      if (f1 !== want[W-1:0] || (is_arith(op) && c1 !== want[W])) begin
        failures++;
        if (failures < 20)
          $display("FAIL arch1 %s a=%h b=%h got %b_%h want %h", op.name(), va, vb, c1, f1, want);
      end
    end
    if (check2) begin
      checks++;
      op_seen[1][op]++;
      if (f2 !== want[W-1:0] || (is_arith(op) && c2 !== want[W])) begin
        failures++;
        if (failures < 20)
          $display("FAIL arch2 %s a=%h b=%h got %b_%h want %h", op.name(), va, vb, c2, f2, want);
      end
    end
    if (is_arith(op)) begin
      if (c1) carry1_seen++;
      else    carry0_seen++;
      if (op == OP_ADDC && (va ^ vb) == '1 && c1 && c2 && f1 == '0) full_ripple_seen++;
    end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL event never happened: %s", what);
    end else begin
      $display("event %-28s %0d", what, n);
    end
  endtask

  initial begin
    m = 1'b0;
    for (int o = 0; o < NUM_OPS; o++) begin
      for (int ar = 0; ar < 2; ar++) begin
        // OR and XOR have different codes on the two architectures: drive
        // each architecture's own code. Other operations share one code.
        if (ar == 1 && controls(op_e'(o), ARCH1) == controls(op_e'(o), ARCH2)) continue;
        for (int vb = 0; vb < (1 << W); vb++)
          for (int va = 0; va < (1 << W); va++)
            apply(op_e'(o), arch_e'(ar), W'(va), W'(vb));
      end
    end
    // Then operations in random order, so that M flips both ways.
    for (int k = 0; k < 4000; k++)
      apply(op_e'($urandom_range(NUM_OPS - 1)), arch_e'($urandom_range(1)),
            W'($urandom), W'($urandom));
    for (int o = 0; o < NUM_OPS; o++) begin
      op_e op;
      op = op_e'(o);
      expect_seen({"arch1 ", op.name()}, op_seen[0][o]);
      expect_seen({"arch2 ", op.name()}, op_seen[1][o]);
    end
    expect_seen("carry out 1", carry1_seen);
    expect_seen("carry out 0", carry0_seen);
    expect_seen("carry through all slices", full_ripple_seen);
    expect_seen("mode switch to logic", to_logic_seen);
    expect_seen("mode switch to arithmetic", to_arith_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
