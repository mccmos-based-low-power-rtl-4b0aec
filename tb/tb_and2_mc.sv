// tb_and2_mc: exhaustive check of the AND cell against the truth table.
module tb_and2_mc;
  int checks = 0, failures = 0;
  logic a, b, y;
  and2_mc dut (.a(a), .b(b), .y(y));
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
      if (y !== (i == 3)) begin failures++; $display("FAIL a=%b b=%b y=%b", a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
