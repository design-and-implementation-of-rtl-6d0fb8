// cla4: 4-bit carry look-ahead adder.
//
// Four 1-bit cells produce P and G for each bit; one 4-bit look-ahead generator turns them and
// the carry in C0 into the carries C1..C4, which go back to the cells to form the sums. PG and
// GG describe the whole group for a higher-level generator. Purely combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       c0,
  output logic [3:0] s,
  output logic       c4,
  output logic       pg,
  output logic       gg
);

  logic [3:0] p, g;
  logic [4:1] c;
  logic [3:0] cin;

  assign cin = {c[3:1], c0};

  for (genvar i = 0; i < 4; i++) begin : g_bit
    cla_full_adder u_fa (.a(a[i]), .b(b[i]), .c(cin[i]), .s(s[i]), .p(p[i]), .g(g[i]));
  end

  cla_lookahead4 u_lag (.p(p), .g(g), .c0(c0), .c(c), .pg(pg), .gg(gg));

  assign c4 = c[4];

endmodule
