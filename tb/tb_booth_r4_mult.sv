// tb_booth_r4_mult: tests the combinational radix-4 Booth multiplier.
//
// At the default 8 x 8 size all 65536 signed operand pairs are compared with the product of
// the two values as integers. A 16 x 16 instance gets 20000 random pairs plus the extreme
// values. The test also counts how often each recoded digit (-2..+2) appears, so that every
// row of the recoding table is known to have been used.
module tb_booth_r4_mult;

  logic signed [7:0]  a8, b8;
  logic signed [15:0] p8;
  logic signed [15:0] a16, b16;
  logic signed [31:0] p16;
  int checks = 0, failures = 0;
  int digit_seen [5];

  booth_r4_mult dut8 (.a(a8), .b(b8), .product(p8));
  booth_r4_mult #(.N(16)) dut16 (.a(a16), .b(b16), .product(p16));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int booth_digit(input logic [2:0] t);
    return -2 * int'(t[2]) + int'(t[1]) + int'(t[0]);
  endfunction

  task automatic check16(input logic signed [15:0] x, input logic signed [15:0] y);
    longint expected;
    a16 = x; b16 = y;
    #1;
    expected = longint'(x) * longint'(y);
    checks++;
    if (p16 !== 32'(expected)) begin
      failures++;
      if (failures < 10) $display("FAIL16 %0d * %0d = %0d", x, y, p16);
    end
  endtask

  initial begin
    logic [8:0] bx;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (p8 !== 16'(int'(a8) * int'(b8))) begin
          failures++;
          if (failures < 10) $display("FAIL8 %0d * %0d = %0d", a8, b8, p8);
        end
      end
      bx = {8'(i), 1'b0};
      for (int d = 0; d < 4; d++) digit_seen[booth_digit(bx[2*d +: 3]) + 2]++;
    end
    check16(16'sh7fff, 16'sh7fff);
    check16(-16'sh8000, -16'sh8000);
    check16(-16'sh8000, 16'sh7fff);
    check16(16'sh0000, -16'sh8000);
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom));
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (digit_seen[d] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never used", d - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
