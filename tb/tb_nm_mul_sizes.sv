// tb_nm_mul_sizes: the Nikhilum multiplier at the smaller sizes it is built in,
// default options (zero guard on, exact carry merge): W = 4 and W = 8 on every
// operand pair, W = 16 on corners and random pairs, all against a * b.
module tb_nm_mul_sizes;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;   logic [7:0]  p4;
  logic [7:0]  a8, b8;   logic [15:0] p8;
  logic [15:0] a16, b16; logic [31:0] p16;

  nm_mul #(.W(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  nm_mul #(.W(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  nm_mul #(.W(16)) dut16 (.a(a16), .b(b16), .p(p16));

  task automatic check16(logic [15:0] x, logic [15:0] y);
    a16 = x; b16 = y;
    #1;
    checks++;
    if (p16 !== 32'(x) * 32'(y)) begin
      failures++; if (failures < 20) $display("FAIL W=16 %h * %h got %h", x, y, p16);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      checks++;
      if (p4 !== 8'(a4) * 8'(b4)) begin failures++; $display("FAIL W=4 %0d * %0d got %0d", a4, b4, p4); end
    end
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      checks++;
      if (p8 !== 16'(a8) * 16'(b8)) begin
        failures++; if (failures < 20) $display("FAIL W=8 %0d * %0d got %0d", a8, b8, p8);
      end
    end
    check16('0, '1);
    check16('1, '0);
    check16('1, '1);
    check16(16'h8000, 16'h0001);
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
