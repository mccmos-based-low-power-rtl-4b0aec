// complementor_mc: W-bit two's complementer, y = (~x + 1) mod 2^W.
//
// In the Nikhilum multiplier it turns each operand X into its distance from the
// base 2^W, X' = 2^W - X (for X = 0 the result is 0, because the base itself
// does not fit in W bits). Only the function is given for this block; it is
// built here as an inverter row followed by an incrementer whose carries ripple
// through the trailing ones of ~x. Combinational.
module complementor_mc #(
  parameter int W = 32
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  logic [W-1:0] n;
  logic [W-1:0] c;   // incrementer carries, c[0] = 1

  assign n    = ~x;
  assign c[0] = 1'b1;
  for (genvar i = 0; i < W; i++) begin : g_inc
    assign y[i] = n[i] ^ c[i];
    if (i < W - 1) begin : g_carry
      assign c[i+1] = n[i] & c[i];
    end
  end
endmodule
