// tb_cla_lookahead4: exhaustive test of the 4-bit carry look-ahead generator.
//
// All 512 combinations of P, G and C0 are applied. The expected carries come from evaluating
// C(i+1) = G(i) | P(i) & C(i) one bit at a time; the expected group signals are PG = all P and
// GG = the carry out of the group with C0 = 0.
module tb_cla_lookahead4;

  logic [3:0] p, g;
  logic       c0;
  logic [4:1] c;
  logic       pg, gg;
  int checks = 0, failures = 0;

  cla_lookahead4 dut (.p(p), .g(g), .c0(c0), .c(c), .pg(pg), .gg(gg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] rc;
    logic       rg;
    for (int v = 0; v < 512; v++) begin
      {c0, g, p} = 9'(v);
      #1;
      rc[0] = c0;
      for (int i = 0; i < 4; i++) rc[i+1] = g[i] | (p[i] & rc[i]);
      rg = 1'b0;
      for (int i = 0; i < 4; i++) rg = g[i] | (p[i] & rg);
      checks++;
      if (c !== rc[4:1] || pg !== (&p) || gg !== rg) begin
        failures++;
        if (failures < 10)
          $display("FAIL p=%b g=%b c0=%b: c=%b pg=%b gg=%b, expected c=%b pg=%b gg=%b",
                   p, g, c0, c, pg, gg, rc[4:1], &p, rg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
