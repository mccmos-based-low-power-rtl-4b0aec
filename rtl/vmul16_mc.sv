// vmul16_mc: 16 x 16 bit unsigned Urdhva Tiryakbhyam multiplier.
//
// Four 8 x 8 multipliers (vmul8_mc) form the products of the operand halves,
// q0 = a_lo*b_lo, q1 = a_hi*b_lo, q2 = a_lo*b_hi and q3 = a_hi*b_hi, and
// ut_combine adds them with two 16-bit carry look-ahead adders and a 8-stage
// half-adder chain into the 32-bit product. This is the document's
// 16x16 (VMUL16MC) structure; OR_CARRY_MERGE selects how the two adder carries are merged
// (see ut_combine; the default 0 gives the exact product, 1 the OR gate as drawn).
//
// Interface: a, b (16 bits, unsigned), p = a * b (32 bits).
// Purely combinational, no clock.
module vmul16_mc #(
  parameter bit OR_CARRY_MERGE = 1'b0
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  localparam int W = 16;
  localparam int H = W / 2;

  logic [W-1:0] q0, q1, q2, q3;

  vmul8_mc #(.OR_CARRY_MERGE(OR_CARRY_MERGE)) u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
  vmul8_mc #(.OR_CARRY_MERGE(OR_CARRY_MERGE)) u_q1 (.a(a[W-1:H]), .b(b[H-1:0]), .p(q1));
  vmul8_mc #(.OR_CARRY_MERGE(OR_CARRY_MERGE)) u_q2 (.a(a[H-1:0]), .b(b[W-1:H]), .p(q2));
  vmul8_mc #(.OR_CARRY_MERGE(OR_CARRY_MERGE)) u_q3 (.a(a[W-1:H]), .b(b[W-1:H]), .p(q3));

  ut_combine #(.W(W), .OR_CARRY_MERGE(OR_CARRY_MERGE)) u_comb (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );
endmodule
