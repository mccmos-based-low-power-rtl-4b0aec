// or2_mc: two-input OR gate.
//
// In each recursive level of the UT multiplier this gate merges the carry outs
// of the two wide adders before they enter the half-adder chain of the top
// quarter of the product (see vmul_mc, which uses it only when the
// OR_CARRY_MERGE option is set). Purely combinational.
module or2_mc (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = a | b;
endmodule
