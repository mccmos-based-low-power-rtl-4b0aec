// tb_vmul4_mc: all 256 operand pairs of the 4x4 UT multiplier, in both carry
// merge variants, against a * b (the OR merge is exact at this width).
module tb_vmul4_mc;
  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [7:0] p, p_or;
  vmul4_mc                        dut    (.a(a), .b(b), .p(p));
  vmul4_mc #(.OR_CARRY_MERGE(1'b1)) dut_or (.a(a), .b(b), .p(p_or));
  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks += 2;
      if (p    !== 8'(a) * 8'(b)) begin failures++; $display("FAIL %0d * %0d got %0d", a, b, p); end
      if (p_or !== 8'(a) * 8'(b)) begin failures++; $display("FAIL OR %0d * %0d got %0d", a, b, p_or); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
