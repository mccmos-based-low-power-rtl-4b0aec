// vmul2_mc: 2 x 2 bit unsigned multiplier, the leaf of the UT multiplier tree.
//
// Four AND cells form the partial products a0b0, a0b1, a1b0 and a1b1. a0b0 is
// p[0]. A half adder sums the two cross products a0b1 + a1b0, giving p[1] and a
// carry; a second half adder adds that carry to a1b1, giving p[2] and p[3].
// This is the gate structure of the document's 2x2 cell. Combinational.
module vmul2_mc (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic pp00, pp01, pp10, pp11;  // pp<i><j> = a[i] & b[j]
  logic c1;

  and2_mc u_and00 (.a(a[0]), .b(b[0]), .y(pp00));
  and2_mc u_and01 (.a(a[0]), .b(b[1]), .y(pp01));
  and2_mc u_and10 (.a(a[1]), .b(b[0]), .y(pp10));
  and2_mc u_and11 (.a(a[1]), .b(b[1]), .y(pp11));

  assign p[0] = pp00;
  ha_mc u_ha1 (.a(pp01), .b(pp10), .sum(p[1]), .carry(c1));
  ha_mc u_ha2 (.a(c1),   .b(pp11), .sum(p[2]), .carry(p[3]));
endmodule
