// tb_sub_mc: checks the subtractor, d = (a - b) mod 2^W and borrow = a < b,
// exhaustively at W = 6 and on corners plus random pairs at the default 32.
module tb_sub_mc;
  int checks = 0, failures = 0;
  logic [5:0]  a6, b6, d6;    logic bo6;
  logic [31:0] a32, b32, d32; logic bo32;
  sub_mc #(.W(6)) dut6  (.a(a6),  .b(b6),  .d(d6),  .borrow(bo6));
  sub_mc          dut32 (.a(a32), .b(b32), .d(d32), .borrow(bo32));

  task automatic check32(logic [31:0] x, logic [31:0] y);
    a32 = x; b32 = y;
    #1;
    checks++;
    if (d32 !== x - y || bo32 !== (x < y)) begin
      failures++; $display("FAIL W=32 %h - %h got %h borrow %b", x, y, d32, bo32);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      {a6, b6} = 12'(i);
      #1;
      checks++;
      if (d6 !== 6'(int'(a6) - int'(b6)) || bo6 !== (a6 < b6)) begin
        failures++; $display("FAIL W=6 %h - %h got %h borrow %b", a6, b6, d6, bo6);
      end
    end
    check32(32'd0, 32'd1);
    check32(32'd1, 32'd0);
    check32('1, '1);
    check32(32'd0, '1);
    for (int i = 0; i < 5000; i++) check32($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
