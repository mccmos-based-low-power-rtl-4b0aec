// tb_ut_combine: the adder network of one UT level at the default W = 32, fed
// with random partial products (any values a 16 x 16 multiplier can give,
// i.e. at most (2^16 - 1)^2) and with the largest ones. The exact variant must
// give q0 + 2^16*(q1 + q2) + 2^32*q3 mod 2^64; the OR variant must give the same
// with 2^48 * (c1 & c2) removed, c1 and c2 being the carries worked out here.
module tb_ut_combine;
  int checks = 0, failures = 0, both = 0;
  logic [31:0] q0, q1, q2, q3;
  logic [63:0] p, p_or;
  ut_combine                          dut    (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
  ut_combine #(.OR_CARRY_MERGE(1'b1)) dut_or (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p_or));

  task automatic check(logic [15:0] x0, logic [15:0] y0, logic [15:0] x1, logic [15:0] y1);
    logic [63:0] exp;
    logic [32:0] t1, t2;
    logic c1, c2;
    // partial products of a = {x1, x0}, b = {y1, y0}
    q0 = 32'(x0) * 32'(y0); q1 = 32'(x1) * 32'(y0);
    q2 = 32'(x0) * 32'(y1); q3 = 32'(x1) * 32'(y1);
    #1;
    exp = 64'(q0) + (64'(q1) << 16) + (64'(q2) << 16) + (64'(q3) << 32);
    t1  = 33'(q1) + 33'(q2);                              c1 = t1[32];
    t2  = 33'(t1[31:0]) + 33'(q0[31:16]) + (33'(q3[15:0]) << 16); c2 = t2[32];
    checks += 2;
    if (p !== exp) begin failures++; if (failures < 20) $display("FAIL exact got %h exp %h", p, exp); end
    if (p_or !== exp - ((c1 && c2) ? 64'(1) << 48 : 64'd0)) begin
      failures++; if (failures < 20) $display("FAIL OR got %h", p_or);
    end
    if (c1 && c2) both++;
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    check('1, '1, '1, '1);
    check('0, '0, '0, '0);
    check('1, '0, '1, '1);
    for (int i = 0; i < 30000; i++) check(16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom));
    $display("both carries set: %0d times", both);
    checks++;
    if (both == 0) begin failures++; $display("FAIL double carry never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
