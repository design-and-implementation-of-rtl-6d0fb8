// tb_booth_seq_mult: tests the iterative radix-4 Booth multiplier.
//
// Each multiplication is started with a one-cycle start pulse; the test then counts clock
// cycles to the done pulse, which must arrive after N/2 + 1 = 5 steps, checks that busy is
// high throughout, and compares the product with one worked out from the operands as integers,
// each read as signed or unsigned according to its control bit. All four signed/unsigned
// combinations are covered with extreme values and 4000 random pairs. A start pulse given
// while the unit is busy must be ignored: the running product must not change.
module tb_booth_seq_mult;

  localparam int N       = 8;
  localparam int LATENCY = N / 2 + 1;

  logic           clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [N-1:0]   a = '0, b = '0;
  logic           a_signed = 1'b0, b_signed = 1'b0;
  logic           busy, done;
  logic [2*N-1:0] product;
  int checks = 0, failures = 0;
  int mode_seen [4];

  booth_seq_mult #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*N-1:0] ref_mul(input logic [N-1:0] x, input logic sx,
                                             input logic [N-1:0] y, input logic sy);
    longint vx, vy;
    vx = sx ? longint'($signed(x)) : longint'(x);
    vy = sy ? longint'($signed(y)) : longint'(y);
    return (2*N)'(vx * vy);
  endfunction

  task automatic run(input logic [N-1:0] x, input logic sx, input logic [N-1:0] y,
                     input logic sy, input bit poke_start);
    int cycles;
    @(negedge clk);
    a = x; b = y; a_signed = sx; b_signed = sy; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    // change the operands while busy: the result must not depend on them
    a = ~x; b = ~y; a_signed = ~sx; b_signed = ~sy;
    cycles = 0;   // clock edges after the one that accepted start
    while (!done) begin
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL busy low before done");
      end
      if (poke_start && cycles == 1) start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles++;
      if (cycles > 20) break;
    end
    checks++;
    if (cycles != LATENCY) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cycles, LATENCY);
    end
    checks++;
    if (product !== ref_mul(x, sx, y, sy)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h(%b) * %h(%b) = %h, expected %h", x, sx, y, sy, product,
                 ref_mul(x, sx, y, sy));
    end
    mode_seen[{sx, sy}]++;
    @(negedge clk);
    checks++;
    if (busy || done) begin
      failures++;
      $display("FAIL unit not idle after done");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    checks++;
    if (busy || done || product !== '0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
    for (int m = 0; m < 4; m++) begin
      run(8'h80, m[1], 8'h80, m[0], 1'b0);
      run(8'hff, m[1], 8'hff, m[0], 1'b0);
      run(8'h7f, m[1], 8'h80, m[0], 1'b0);
      run(8'h00, m[1], 8'h9c, m[0], 1'b0);
      run(8'h55, m[1], 8'haa, m[0], 1'b1);
    end
    for (int i = 0; i < 4000; i++)
      run(8'($urandom), 1'($urandom), 8'($urandom), 1'($urandom), (i % 7) == 0);
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (mode_seen[m] == 0) begin
        failures++;
        $display("FAIL signedness mode %0d never used", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
