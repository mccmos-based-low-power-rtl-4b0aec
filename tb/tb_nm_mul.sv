// tb_nm_mul: end-to-end test of the 32 x 32 Nikhilum multiplier with every
// parameter at its default. Each product is compared with a * b computed by
// the '*' operator. Operands: zeros and ones, the largest values, values
// just below and above powers of two (near the Nikhilum base and far from
// it), and random pairs.
//
// It counts how often each mechanism of the datapath was exercised and fails
// if one never was:
//   zero_guard  - an operand was 0 and the product was forced to 0;
//   borrow      - the subtractor A - B' wrapped (A < B');
//   add_carry   - the final adder's carry out was dropped;
//   double_cy   - both wide-adder carries of the top UT level were set, so the
//                 full-adder merge was needed.
module tb_nm_mul;
  int checks = 0, failures = 0;
  int n_zero = 0, n_borrow = 0, n_add_carry = 0, n_double = 0;

  logic [31:0] a, b;
  logic [63:0] p;

  nm_mul dut (.a(a), .b(b), .p(p));

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic [63:0] exp;
    a = x; b = y;
    #1;
    exp = 64'(x) * 64'(y);
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %h * %h = %h, got %h", x, y, exp, p);
    end
    if (x == 0 || y == 0)               n_zero++;
    if (dut.u_sub.borrow)               n_borrow++;
    if (dut.u_add.cout)                 n_add_carry++;
    if (dut.g_w32.u_vmul.u_comb.c1 && dut.g_w32.u_vmul.u_comb.c2) n_double++;
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'd0, 32'd0);
    check(32'd0, 32'd12345);
    check(32'd98765, 32'd0);
    check(32'd1, 32'd1);
    check('1, '1);
    check('1, 32'd1);
    check(32'd1, '1);
    check(32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j += 3) begin
        check(32'(64'd1 << i), 32'(64'd1 << j));
        check(32'((64'd1 << i) - 1), 32'((64'd1 << j) + 1));
        check(-32'(i + 1), -32'(j + 1));   // close to the base 2^32
      end
    for (int i = 0; i < 50000; i++) check($urandom, $urandom);
    for (int i = 0; i < 2000; i++) check($urandom >> ($urandom % 32), $urandom >> ($urandom % 32));
    $display("mechanisms: zero_guard=%0d borrow=%0d add_carry=%0d double_cy=%0d",
             n_zero, n_borrow, n_add_carry, n_double);
    checks += 4;
    if (n_zero == 0)      begin failures++; $display("FAIL zero guard never used"); end
    if (n_borrow == 0)    begin failures++; $display("FAIL subtractor never borrowed"); end
    if (n_add_carry == 0) begin failures++; $display("FAIL final adder never carried"); end
    if (n_double == 0)    begin failures++; $display("FAIL double carry never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
