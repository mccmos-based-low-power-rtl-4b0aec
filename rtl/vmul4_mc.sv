// vmul4_mc: 4 x 4 bit unsigned Urdhva Tiryakbhyam multiplier.
//
// Four 2 x 2 multipliers (vmul2_mc) form the products of the operand halves,
// q0 = a_lo*b_lo, q1 = a_hi*b_lo, q2 = a_lo*b_hi and q3 = a_hi*b_hi, and
// ut_combine adds them with two 4-bit carry look-ahead adders and a 2-stage
// half-adder chain into the 8-bit product. This is the document's
// 4x4 (VMUL4MC) structure; OR_CARRY_MERGE selects how the two adder carries are merged
// (see ut_combine; the default 0 gives the exact product, 1 the OR gate as drawn).
//
// Interface: a, b (4 bits, unsigned), p = a * b (8 bits).
// Purely combinational, no clock.
module vmul4_mc #(
  parameter bit OR_CARRY_MERGE = 1'b0
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  localparam int W = 4;
  localparam int H = W / 2;

  logic [W-1:0] q0, q1, q2, q3;

  vmul2_mc u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
  vmul2_mc u_q1 (.a(a[W-1:H]), .b(b[H-1:0]), .p(q1));
  vmul2_mc u_q2 (.a(a[H-1:0]), .b(b[W-1:H]), .p(q2));
  vmul2_mc u_q3 (.a(a[W-1:H]), .b(b[W-1:H]), .p(q3));

  ut_combine #(.W(W), .OR_CARRY_MERGE(OR_CARRY_MERGE)) u_comb (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );
endmodule
