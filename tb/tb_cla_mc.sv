// tb_cla_mc: checks the carry look-ahead adder against the '+' operator.
// A 4-bit instance (one look-ahead group) is checked exhaustively with both
// carry-in values, a 6-bit one (a partial last group) exhaustively too, and
// the default 32-bit instance on carry-chain corner cases and random operands.
module tb_cla_mc;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;   logic ci4, co4;
  logic [5:0]  a6, b6, s6;   logic ci6, co6;
  logic [31:0] a32, b32, s32; logic ci32, co32;

  cla_mc #(.W(4)) dut4 (.a(a4), .b(b4), .cin(ci4), .s(s4), .cout(co4));
  cla_mc #(.W(6)) dut6 (.a(a6), .b(b6), .cin(ci6), .s(s6), .cout(co6));
  cla_mc          dut32 (.a(a32), .b(b32), .cin(ci32), .s(s32), .cout(co32));

  task automatic check32(logic [31:0] x, logic [31:0] y, logic c);
    logic [32:0] exp;
    a32 = x; b32 = y; ci32 = c;
    #1;
    exp = 33'(x) + 33'(y) + 33'(c);
    checks++;
    if ({co32, s32} !== exp) begin
      failures++;
      $display("FAIL W=32 %h + %h + %b = %h, got %b %h", x, y, c, exp, co32, s32);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {ci4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} !== 5'(int'(a4) + int'(b4) + int'(ci4))) begin
        failures++; $display("FAIL W=4 %h + %h + %b", a4, b4, ci4);
      end
    end
    for (int i = 0; i < 8192; i++) begin
      {ci6, a6, b6} = 13'(i);
      #1;
      checks++;
      if ({co6, s6} !== 7'(int'(a6) + int'(b6) + int'(ci6))) begin
        failures++; $display("FAIL W=6 %h + %h + %b", a6, b6, ci6);
      end
    end
    check32('1, 32'd0, 1'b1);           // carry ripples through every group
    check32('1, 32'd1, 1'b0);
    check32('1, '1, 1'b1);
    check32(32'h0000_0000, 32'h0000_0000, 1'b0);
    check32(32'h0FFF_FFFF, 32'h0000_0001, 1'b0);
    for (int g = 0; g < 8; g++) check32(32'hFFFF_FFFF >> (4 * g), 32'd1, 1'b0);
    for (int i = 0; i < 20000; i++) check32($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
