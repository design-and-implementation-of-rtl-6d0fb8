// tb_cla_adder: tests the carry look-ahead adder at its default 16-bit width and at 24 bits.
//
// Directed corner cases (all ones plus one, carries rippling through every group, zero) are
// followed by 20000 random operand pairs; every 17-bit (25-bit) result is compared with
// integer addition. The 24-bit instance covers the case of more than four 4-bit groups, where
// a second look-ahead generator is needed.
module tb_cla_adder;

  logic [15:0] a16, b16;
  logic [16:0] r16;
  logic [23:0] a24, b24;
  logic [24:0] r24;
  int checks = 0, failures = 0;

  cla_adder dut16 (.i_add1(a16), .i_add2(b16), .o_result(r16));
  cla_adder #(.WIDTH(24)) dut24 (.i_add1(a24), .i_add2(b24), .o_result(r24));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] x, input logic [15:0] y,
                       input logic [23:0] u, input logic [23:0] v);
    a16 = x; b16 = y; a24 = u; b24 = v;
    #1;
    checks++;
    if (r16 !== 17'(x) + 17'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL16 %h + %h = %h", x, y, r16);
    end
    checks++;
    if (r24 !== 25'(u) + 25'(v)) begin
      failures++;
      if (failures < 10) $display("FAIL24 %h + %h = %h", u, v, r24);
    end
  endtask

  initial begin
    apply(16'hffff, 16'h0001, 24'hffffff, 24'h000001);
    apply(16'h0000, 16'h0000, 24'h000000, 24'h000000);
    apply(16'hffff, 16'hffff, 24'hffffff, 24'hffffff);
    apply(16'h7fff, 16'h0001, 24'h7fffff, 24'h000001);
    apply(16'h0fff, 16'h0001, 24'h0fffff, 24'h000001);
    apply(16'haaaa, 16'h5555, 24'haaaaaa, 24'h555555);
    for (int i = 0; i < 16; i++)
      apply(16'hffff >> i, 16'(1), 24'hffffff >> i, 24'(1));
    for (int i = 0; i < 20000; i++)
      apply(16'($urandom), 16'($urandom), 24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
