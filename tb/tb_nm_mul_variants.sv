// tb_nm_mul_variants: the Nikhilum multiplier with its two options turned to
// the literal datapath (no zero guard, OR carry merge), and with the guard
// alone turned off.
//   * W = 4, both options literal: every pair of nonzero operands gives a * b
//     (the OR merge is exact at this width); a = 0, b != 0 gives 2^4 * b and
//     b = 0 gives 2^4 * a, both mod 2^8.
//   * W = 8, guard off, exact merge: the same rule, all pairs.
//   * W = 8, both literal: nonzero pairs against 2^8 * (a - b') + ut_or_ref(a', b').
//   * W = 32, guard off, exact merge: random nonzero pairs give a * b.
module tb_nm_mul_variants;
  import ut_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;   logic [7:0]  p4;
  logic [7:0]  a8, b8;   logic [15:0] p8, p8o;
  logic [31:0] a32, b32; logic [63:0] p32;

  nm_mul #(.W(4), .ZERO_GUARD(1'b0), .OR_CARRY_MERGE(1'b1)) dut4  (.a(a4), .b(b4), .p(p4));
  nm_mul #(.W(8), .ZERO_GUARD(1'b0))                        dut8  (.a(a8), .b(b8), .p(p8));
  nm_mul #(.W(8), .ZERO_GUARD(1'b0), .OR_CARRY_MERGE(1'b1)) dut8o (.a(a8), .b(b8), .p(p8o));
  nm_mul #(.W(32), .ZERO_GUARD(1'b0))                       dut32 (.a(a32), .b(b32), .p(p32));

  // what the unguarded datapath gives, from the operands alone
  function automatic longint unsigned unguarded(longint unsigned x, longint unsigned y, int w);
    longint unsigned mask2 = (64'd1 << (2 * w)) - 1;
    if (x != 0 && y != 0) return x * y;
    if (x == 0)           return (y << w) & mask2;
    return (x << w) & mask2;
  endfunction

  task automatic fail(string what);
    failures++;
    if (failures < 20) $display("FAIL %s", what);
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
      if (p4 !== 8'(unguarded(64'(a4), 64'(b4), 4))) fail($sformatf("W=4 %h * %h got %h", a4, b4, p4));
    end
    for (int i = 0; i < 65536; i++) begin
      logic [7:0] ac, bc;
      {a8, b8} = 16'(i);
      #1;
      checks++;
      if (p8 !== 16'(unguarded(64'(a8), 64'(b8), 8))) fail($sformatf("W=8 %h * %h got %h", a8, b8, p8));
      if (a8 != 0 && b8 != 0) begin
        ac = -a8; bc = -b8;
        checks++;
        if (p8o !== 16'((64'(8'(a8 - bc)) << 8) + ut_or_ref(64'(ac), 64'(bc), 8)))
          fail($sformatf("W=8 OR %h * %h got %h", a8, b8, p8o));
      end
    end
    for (int i = 0; i < 5000; i++) begin
      a32 = $urandom | 32'd1; b32 = $urandom | 32'd1;
      #1;
      checks++;
      if (p32 !== 64'(a32) * 64'(b32)) fail($sformatf("W=32 %h * %h got %h", a32, b32, p32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
