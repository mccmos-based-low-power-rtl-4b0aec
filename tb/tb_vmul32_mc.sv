// tb_vmul32_mc: the 32x32 UT multiplier, default exact carry merge, on corner
// cases and random operand pairs against a * b, plus the OR-merge variant
// against ut_or_ref. Counts the pairs with both top-level adder carries set
// and fails if there were none.
module tb_vmul32_mc;
  import ut_ref_pkg::*;
  int checks = 0, failures = 0, both = 0;
  logic [31:0] a, b;
  logic [63:0] p, p_or;
  vmul32_mc                          dut    (.a(a), .b(b), .p(p));
  vmul32_mc #(.OR_CARRY_MERGE(1'b1)) dut_or (.a(a), .b(b), .p(p_or));

  task automatic check(logic [31:0] x, logic [31:0] y);
    a = x; b = y;
    #1;
    checks += 2;
    if (p !== 64'(x) * 64'(y)) begin
      failures++; if (failures < 20) $display("FAIL %h * %h got %h", x, y, p);
    end
    if (p_or !== 64'(ut_or_ref(64'(x), 64'(y), 32))) begin
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
    check('1, 32'(1));
    check(32'(1) << 31, 32'(1) << 31);
    check({16'(0), {16{1'b1}}}, {{16{1'b1}}, 16'(0)});
    for (int i = 0; i < 30000; i++) check(32'($urandom), 32'($urandom));
    $display("both carries set: %0d pairs", both);
    checks++;
    if (both == 0) begin failures++; $display("FAIL double carry never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
