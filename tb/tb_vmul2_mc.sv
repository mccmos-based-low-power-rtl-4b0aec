// tb_vmul2_mc: checks the 2x2 multiplier cell. First the input sequence of
// the cell's reference waveform (inputs change every 1 ns: A=B=0, then 1, 2
// and 3), then all 16 operand pairs, each against a * b.
module tb_vmul2_mc;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] p;
  vmul2_mc dut (.a(a), .b(b), .p(p));

  task automatic apply(logic [1:0] x, logic [1:0] y);
    a = x; b = y;
    #1ns;
    checks++;
    if (p !== 4'(x) * 4'(y)) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, got %0d", x, y, 4'(x) * 4'(y), p);
    end
  endtask

  initial begin
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) apply(2'(v), 2'(v));  // waveform sequence
    for (int i = 0; i < 16; i++) apply(2'(i >> 2), 2'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
