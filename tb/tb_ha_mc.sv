// tb_ha_mc: exhaustive check of the half adder: {carry, sum} must equal a + b.
module tb_ha_mc;
  int checks = 0, failures = 0;
  logic a, b, sum, carry;
  ha_mc dut (.a(a), .b(b), .sum(sum), .carry(carry));
  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({carry, sum} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b carry=%b sum=%b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
