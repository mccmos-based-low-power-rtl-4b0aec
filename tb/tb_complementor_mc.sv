// tb_complementor_mc: checks the two's complementer, y = (2^W - x) mod 2^W,
// exhaustively at W = 8 and on corners plus random values at the default 32.
module tb_complementor_mc;
  int checks = 0, failures = 0;
  logic [7:0]  x8, y8;
  logic [31:0] x32, y32;
  complementor_mc #(.W(8)) dut8  (.x(x8),  .y(y8));
  complementor_mc          dut32 (.x(x32), .y(y32));

  task automatic check32(logic [31:0] v);
    x32 = v;
    #1;
    checks++;
    if (y32 !== 32'(33'h1_0000_0000 - 33'(v))) begin
      failures++; $display("FAIL W=32 x=%h y=%h", v, y32);
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
    for (int i = 0; i < 256; i++) begin
      x8 = 8'(i);
      #1;
      checks++;
      if (y8 !== 8'(256 - i)) begin failures++; $display("FAIL W=8 x=%h y=%h", x8, y8); end
    end
    check32(32'd0);
    check32(32'd1);
    check32(32'h8000_0000);
    check32('1);
    for (int i = 0; i < 5000; i++) check32($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
