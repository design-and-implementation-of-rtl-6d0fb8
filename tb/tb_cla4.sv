// tb_cla4: exhaustive test of the 4-bit carry look-ahead adder.
//
// All 512 combinations of A, B and C0 are applied and the sum and carry out compared with
// integer addition. PG is checked against "A xor B is all ones" and GG against the carry out
// of A + B with no carry in.
module tb_cla4;

  logic [3:0] a, b, s;
  logic       c0, c4, pg, gg;
  int checks = 0, failures = 0;

  cla4 dut (.a(a), .b(b), .c0(c0), .s(s), .c4(c4), .pg(pg), .gg(gg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned sum, sum0;
    for (int v = 0; v < 512; v++) begin
      {c0, b, a} = 9'(v);
      #1;
      sum  = 32'(a) + 32'(b) + 32'(c0);
      sum0 = 32'(a) + 32'(b);
      checks++;
      if ({c4, s} !== 5'(sum) || pg !== ((a ^ b) == 4'hf) || gg !== sum0[4]) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h c0=%b: {c4,s}=%h pg=%b gg=%b", a, b, c0, {c4, s}, pg, gg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
