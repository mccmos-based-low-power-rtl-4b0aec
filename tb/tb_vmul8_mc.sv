// tb_vmul8_mc: all 65536 operand pairs of the 8x8 UT multiplier. The default
// (exact merge) instance is compared with a * b, the OR-merge instance with
// ut_or_ref, the arithmetic model of the OR-merged recursion. It counts the
// pairs for which both top-level adder carries are set (where the two
// variants differ) and fails if there were none.
module tb_vmul8_mc;
  import ut_ref_pkg::*;
  int checks = 0, failures = 0, both = 0, differ = 0;
  logic [7:0]  a, b;
  logic [15:0] p, p_or;
  vmul8_mc                          dut    (.a(a), .b(b), .p(p));
  vmul8_mc #(.OR_CARRY_MERGE(1'b1)) dut_or (.a(a), .b(b), .p(p_or));
  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      checks += 2;
      if (p !== 16'(a) * 16'(b)) begin
        failures++; if (failures < 20) $display("FAIL %0d * %0d got %0d", a, b, p);
      end
      if (p_or !== 16'(ut_or_ref(64'(a), 64'(b), 8))) begin
        failures++; if (failures < 20) $display("FAIL OR %0d * %0d got %0d", a, b, p_or);
      end
      if (dut.u_comb.c1 && dut.u_comb.c2) both++;
      if (p != p_or) differ++;
    end
    $display("both carries set: %0d pairs; OR merge differs from a*b: %0d pairs", both, differ);
    checks++;
    if (both == 0) begin failures++; $display("FAIL double carry never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
