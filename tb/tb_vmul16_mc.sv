// tb_vmul16_mc: the 16x16 UT multiplier, default exact carry merge, on corner
// cases and random operand pairs against a * b, plus the OR-merge variant
// against ut_or_ref. Counts the pairs with both top-level adder carries set
// and fails if there were none.
module tb_vmul16_mc;
  import ut_ref_pkg::*;
  int checks = 0, failures = 0, both = 0;
  logic [15:0] a, b;
  logic [31:0] p, p_or;
  vmul16_mc                          dut    (.a(a), .b(b), .p(p));
  vmul16_mc #(.OR_CARRY_MERGE(1'b1)) dut_or (.a(a), .b(b), .p(p_or));

  task automatic check(logic [15:0] x, logic [15:0] y);
    a = x; b = y;
    #1;
    checks += 2;
    if (p !== 32'(x) * 32'(y)) begin
      failures++; if (failures < 20) $display("FAIL %h * %h got %h", x, y, p);
    end
    if (p_or !== 32'(ut_or_ref(64'(x), 64'(y), 16))) begin
      failures++; if (failures < 20) $display("FAIL OR %h * %h got %h", x, y, p_or);
    end
    if (dut.u_comb.c1 && dut.u_comb.c2) both++;
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    check('0, '0);
    check('1, '1);
    check('1, 16'(1));
    check(16'(1) << 15, 16'(1) << 15);
    check({8'(0), {8{1'b1}}}, {{8{1'b1}}, 8'(0)});
    for (int i = 0; i < 30000; i++) check(16'($urandom), 16'($urandom));
    $display("both carries set: %0d pairs", both);
    checks++;
    if (both == 0) begin failures++; $display("FAIL double carry never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
