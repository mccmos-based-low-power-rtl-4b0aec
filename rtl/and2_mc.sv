// and2_mc: two-input AND gate, the partial-product cell of the 2x2 multiplier.
//
// In the multiplier every partial-product bit a_i & b_j comes from one of these
// cells. The cell's transistor sizing (long-channel NMOS) is a property of the
// cell library and has no counterpart here; only the logic function is kept.
// Purely combinational: y follows a and b with no clock.
module and2_mc (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = a & b;
endmodule
