// cla_lookahead4: 4-bit carry look-ahead generator.
//
// From four propagate/generate pairs and the carry into bit 0 it computes every carry at once
// by expanding C(i+1) = G(i) + P(i).C(i) into two-level sum-of-products form, so no carry ripples
// through the bits. It also gives the group propagate PG (all four bits propagate) and group
// generate GG (the group makes a carry on its own), which let a second generator of the same
// kind look ahead across four groups. Purely combinational.
module cla_lookahead4 (
  input  logic [3:0] p,
  input  logic [3:0] g,
  input  logic       c0,
  output logic [4:1] c,    // c[i] is the carry into bit i; c[4] is the carry out
  output logic       pg,
  output logic       gg
);

  always_comb begin
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    pg   = &p;
    c[4] = gg | (pg & c0);
  end

endmodule
