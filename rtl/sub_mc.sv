// sub_mc: W-bit subtractor, d = (a - b) mod 2^W, borrow = (a < b).
//
// Built as a + ~b + 1 on a carry look-ahead adder (cla_mc) with carry in tied
// high; the borrow is the inverted carry out. The block's function is given,
// its gates are this design's choice. In the Nikhilum multiplier it forms
// A - B', the left-hand part of the product; the borrow is left unused there.
// Combinational.
module sub_mc #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] d,
  output logic         borrow
);
  logic cout;

  cla_mc #(.W(W)) u_add (.a(a), .b(~b), .cin(1'b1), .s(d), .cout(cout));
  assign borrow = ~cout;
endmodule
