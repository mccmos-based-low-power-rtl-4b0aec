// nm_mul: W x W bit unsigned Nikhilum multiplier (W = 32 by default; 4, 8 and
// 16 are also supported, the sizes the document builds).
//
// Nikhilum ("all from nine, the last from ten") multiplies numbers close to a
// base by working on their distances from it. With base 2^W, the operands are
// A = 2^W - A' and B = 2^W - B', where A' and B' are their two's complements.
// Then
//     A * B = 2^W * (A - B') + A' * B'
// so the product is built from one subtraction and one product of complements:
//   * two complementors form A' and B';
//   * the UT multiplier (vmul<W>_mc) forms A' * B', a 2W-bit value whose low half
//     is the low half of the product (the "right-hand side");
//   * the subtractor forms A - B' (the "left-hand side"), and a W-bit carry
//     look-ahead adder adds it to the upper half of A' * B'. Its carry out, and
//     the subtractor's borrow, are dropped: the result is taken mod 2^(2W),
//     which is exact because A * B < 2^(2W).
// This datapath follows the document's block diagram and schematics.
//
// Zero operands: a complementor maps 0 to 0, not to the base 2^W, so the
// identity above fails when exactly one operand is 0 (the datapath then gives
// 2^W * B or 2^W * A instead of 0). With ZERO_GUARD = 1 (the default, this
// design's addition) the product is forced to 0 when either operand is 0;
// ZERO_GUARD = 0 leaves the datapath as drawn. OR_CARRY_MERGE is passed to the
// UT multiplier, see ut_combine.
//
// Interface: a (multiplicand), b (multiplier), p = a * b. Purely combinational,
// no clock or reset; the whole product settles in one pass through the
// complementors, the multiplier tree and the final adder.
module nm_mul #(
  parameter int W              = 32,
  parameter bit ZERO_GUARD     = 1'b1,
  parameter bit OR_CARRY_MERGE = 1'b0
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  logic [W-1:0]   a_c, b_c;     // A' and B'
  logic [2*W-1:0] m;            // A' * B'
  logic [W-1:0]   lhs;          // A - B'
  logic [W-1:0]   hi;
  logic           borrow, cout; // both dropped, see above
  logic [2*W-1:0] raw;

  complementor_mc #(.W(W)) u_comp_a (.x(a), .y(a_c));
  complementor_mc #(.W(W)) u_comp_b (.x(b), .y(b_c));

  // the UT multiplier of the complements, one of the document's four sizes
  if (W == 32) begin : g_w32
    vmul32_mc #(.OR_CARRY_MERGE(OR_CARRY_MERGE)) u_vmul (.a(a_c), .b(b_c), .p(m));
  end else if (W == 16) begin : g_w16
    vmul16_mc #(.OR_CARRY_MERGE(OR_CARRY_MERGE)) u_vmul (.a(a_c), .b(b_c), .p(m));
  end else if (W == 8) begin : g_w8
    vmul8_mc #(.OR_CARRY_MERGE(OR_CARRY_MERGE)) u_vmul (.a(a_c), .b(b_c), .p(m));
  end else if (W == 4) begin : g_w4
    vmul4_mc #(.OR_CARRY_MERGE(OR_CARRY_MERGE)) u_vmul (.a(a_c), .b(b_c), .p(m));
  end else begin : g_bad_width
    $error("nm_mul: W must be 4, 8, 16 or 32");
  end

  sub_mc #(.W(W)) u_sub (.a(a), .b(b_c), .d(lhs), .borrow(borrow));

  cla_mc #(.W(W)) u_add (.a(m[2*W-1:W]), .b(lhs), .cin(1'b0), .s(hi), .cout(cout));

  assign raw = {hi, m[W-1:0]};

  if (ZERO_GUARD) begin : g_zero_guard
    assign p = (a == '0 || b == '0) ? '0 : raw;
  end else begin : g_no_guard
    assign p = raw;
  end
endmodule
