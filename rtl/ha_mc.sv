// ha_mc: half adder.
//
// sum = a xor b, carry = a and b. Used in the 2x2 multiplier cell and in the
// carry chain that forms the most significant quarter of every wider
// multiplier level. Purely combinational.
module ha_mc (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
