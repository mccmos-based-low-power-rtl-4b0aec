// cla_mc: W-bit carry look-ahead adder, {cout, s} = a + b + cin.
//
// Every bit forms generate g = a & b and propagate p = a ^ b. The bits are
// split into groups of GROUP bits, and the adder has two look-ahead levels:
// each group forms a group generate and propagate, and every group's carry
// in is computed directly from cin and those group terms; inside a group each
// bit carry is then computed directly from the group's carry in
// (c[k+1] = OR over j of g[j] & p[j+1..k], or p[base..k] & c[base]). No carry
// ripples from group to group. The multiplier uses widths 4, 8, 16 and 32 with
// carry in tied low; the group size of 4 is this design's choice, since only
// the adder's name and width are given for it.
// Purely combinational.
module cla_mc #(
  parameter int W     = 32,
  parameter int GROUP = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int NG = (W + GROUP - 1) / GROUP;  // number of groups

  logic [W-1:0]  g, p;
  logic [NG-1:0] gg, gp;   // group generate and group propagate
  logic [NG:0]   gc;       // group carries, gc[0] = cin
  logic [W-1:0]  c;        // carry into each bit

  assign g = a & b;
  assign p = a ^ b;

  // level 1: group generate / propagate
  always_comb begin
    for (int n = 0; n < NG; n++) begin
      gg[n] = 1'b0;
      gp[n] = 1'b1;
      for (int i = n * GROUP; i < (n + 1) * GROUP && i < W; i++) begin
        gg[n] = g[i] | (p[i] & gg[n]);
        gp[n] = gp[n] & p[i];
      end
    end
  end

  // level 2: every group carry straight from cin and the group terms,
  // gc[n+1] = OR over m <= n of gg[m] & gp[m+1..n], or gp[0..n] & cin
  always_comb begin
    logic term, run;
    gc[0] = cin;
    for (int n = 0; n < NG; n++) begin
      term = 1'b0;
      run  = 1'b1;
      for (int m = n; m >= 0; m--) begin
        term = term | (run & gg[m]);
        run  = run & gp[m];
      end
      gc[n+1] = term | (run & cin);
    end
  end

  // bit carries inside each group, from the group's carry in
  always_comb begin
    logic term, run;
    for (int n = 0; n < NG; n++) begin
      c[n * GROUP] = gc[n];
      for (int k = n * GROUP + 1; k < (n + 1) * GROUP && k < W; k++) begin
        // carry into bit k from the bits n*GROUP .. k-1
        term = 1'b0;
        run  = 1'b1;
        for (int j = k - 1; j >= n * GROUP; j--) begin
          term = term | (run & g[j]);
          run  = run & p[j];
        end
        c[k] = term | (run & gc[n]);
      end
    end
  end

  assign s    = p ^ c;
  assign cout = gc[NG];
endmodule
