// ut_combine: the adder network of one level of the UT multiplier.
//
// A W x W Urdhva Tiryakbhyam (vertical and crosswise) multiplier splits its
// operands into halves of H = W/2 bits and forms four H x H products
//   q0 = a_lo*b_lo   q1 = a_hi*b_lo   q2 = a_lo*b_hi   q3 = a_hi*b_hi .
// This block adds them into the 2W-bit product
//   p = q0 + 2^H*(q1 + q2) + 2^W*q3
// the way the document's schematics do it:
//   * the first W-bit carry look-ahead adder sums the cross products q1 + q2
//     (carry c1);
//   * the second adds that sum to {q3[H-1:0], q0[W-1:H]}, the parts of q0 and
//     q3 that overlap it (carry c2), giving p[W+H-1:H];
//   * p[H-1:0] is q0's low half, unchanged;
//   * the top quarter p[2W-1:W+H] is q3[W-1:H] plus both carries, formed by a
//     ripple chain of half adders. The chain's last carry is dropped because
//     the product always fits in 2W bits.
//
// Merging c1 and c2: the schematics feed c1 | c2 (one OR gate) into the chain.
// That is exact at W = 4, but from W = 8 up both carries can be 1 together and
// the OR then loses 2^(W+H). By default this design instead adds q3[H], c1
// and c2 in a full adder, which makes every width exact; OR_CARRY_MERGE = 1
// selects the OR gate as drawn.
//
// Purely combinational. c1 and c2 are named nets so that a testbench can see
// when both carries occur together.
module ut_combine #(
  parameter int W              = 32,
  parameter bit OR_CARRY_MERGE = 1'b0
) (
  input  logic [W-1:0]   q0,
  input  logic [W-1:0]   q1,
  input  logic [W-1:0]   q2,
  input  logic [W-1:0]   q3,
  output logic [2*W-1:0] p
);
  localparam int H = W / 2;

  logic [W-1:0] s1, s2;
  logic         c1, c2;
  logic [H:1]   k;    // carries along the top-quarter chain; k[H] is dropped
  logic [H-1:0] top;

  cla_mc #(.W(W)) u_add1 (.a(q1), .b(q2), .cin(1'b0), .s(s1), .cout(c1));
  cla_mc #(.W(W)) u_add2 (.a(s1), .b({q3[H-1:0], q0[W-1:H]}), .cin(1'b0), .s(s2), .cout(c2));

  assign p[H-1:0]   = q0[H-1:0];
  assign p[W+H-1:H] = s2;

  if (OR_CARRY_MERGE) begin : g_or_merge
    // as drawn: c1 | c2 enters a half adder with q3[H]
    logic m;
    or2_mc u_or  (.a(c1), .b(c2), .y(m));
    ha_mc  u_ha0 (.a(q3[H]), .b(m), .sum(top[0]), .carry(k[1]));
  end else begin : g_fa_merge
    // exact: q3[H] + c1 + c2 in a full adder
    assign top[0] = q3[H] ^ c1 ^ c2;
    assign k[1]   = (q3[H] & c1) | (q3[H] & c2) | (c1 & c2);
  end

  for (genvar i = 1; i < H; i++) begin : g_chain
    ha_mc u_ha (.a(q3[H+i]), .b(k[i]), .sum(top[i]), .carry(k[i+1]));
  end

  assign p[2*W-1:W+H] = top;
endmodule
