// tb_fir_top: end-to-end test of the top level at its default (and only) size.
//
// The block FIR filter and the standalone iterative Booth multiplier are exercised at the same
// time, each against a model written independently of the RTL:
//  * filter: the reference input sequence (three blocks held for 16 clocks each, whose settled
//    outputs must be 32 31 30 37 / 30 24 22 24 / 76 68 64 72), then 2000 random blocks, every
//    output compared with a sample-by-sample model one clock after its block;
//  * multiplier: back-to-back multiplications with random operands and signedness, each
//    checked for its product and its 5-cycle latency; a start pulse given while busy must be
//    ignored.
// Mechanisms counted, each of which must occur at least once: the reset clearing the outputs,
// a settled reference block, each of the four signed/unsigned operand combinations, each of
// the five radix-4 Booth digits (-2..+2) in the multiplier's recoding, and an ignored start.
module tb_fir_top;

  localparam int TAPS = 8, BLOCK = 4;
  localparam int H [TAPS] = '{2, 1, 1, 2, -1, 1, 2, 2};

  logic        clk = 1'b0, rst = 1'b1;
  logic [7:0]  xi0 = '0, xi1 = '0, xi2 = '0, xi3 = '0;
  logic [15:0] o1, o2, o3, o4;
  logic        mul_start = 1'b0, mul_a_signed = 1'b0, mul_b_signed = 1'b0;
  logic [7:0]  mul_a = '0, mul_b = '0;
  logic        mul_busy, mul_done;
  logic [15:0] mul_product;

  int checks = 0, failures = 0;
  int n_reset = 0, n_settled = 0, n_ignored = 0;
  int n_mode [4];
  int n_digit [5];
  bit fir_finished = 0;

  int hist [BLOCK + TAPS];

  fir_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- filter ----------------
  function automatic logic [15:0] fir_model(input int k);
    int acc = 0;
    for (int t = 0; t < TAPS; t++) acc += H[t] * hist[k + t];
    return 16'(acc);
  endfunction

  task automatic fir_step(input logic [7:0] s0, s1, s2, s3);
    logic [15:0] got [BLOCK];
    @(negedge clk);
    xi0 = s0; xi1 = s1; xi2 = s2; xi3 = s3;
    for (int j = BLOCK + TAPS - 1; j >= BLOCK; j--) hist[j] = hist[j - BLOCK];
    hist[0] = int'($signed(s0)); hist[1] = int'($signed(s1));
    hist[2] = int'($signed(s2)); hist[3] = int'($signed(s3));
    @(posedge clk);
    #1;
    got = '{o1, o2, o3, o4};
    for (int k = 0; k < BLOCK; k++) begin
      checks++;
      if (got[k] !== fir_model(k)) begin
        failures++;
        if (failures < 10) $display("FAIL o%0d=%0d expected %0d", k + 1, got[k], fir_model(k));
      end
    end
  endtask

  task automatic fir_hold(input logic [7:0] s0, s1, s2, s3, input int e1, e2, e3, e4);
    repeat (16) fir_step(s0, s1, s2, s3);
    checks++;
    if (o1 != 16'(e1) || o2 != 16'(e2) || o3 != 16'(e3) || o4 != 16'(e4)) begin
      failures++;
      $display("FAIL settled %0d %0d %0d %0d, expected %0d %0d %0d %0d", o1, o2, o3, o4,
               e1, e2, e3, e4);
    end else n_settled++;
  endtask

  // ---------------- multiplier ----------------
  function automatic logic [15:0] mul_model(input logic [7:0] x, input logic sx,
                                            input logic [7:0] y, input logic sy);
    int vx, vy;
    vx = sx ? int'($signed(x)) : int'(x);
    vy = sy ? int'($signed(y)) : int'(y);
    return 16'(vx * vy);
  endfunction

  task automatic count_digits(input logic [7:0] y, input logic sy);
    logic [10:0] e;   // multiplier extended to 10 bits, with b(-1) = 0 below
    e = {{2{sy & y[7]}}, y, 1'b0};
    for (int d = 0; d < 5; d++)
      n_digit[-2 * int'(e[2*d+2]) + int'(e[2*d+1]) + int'(e[2*d]) + 2]++;
  endtask

  task automatic mul_run(input logic [7:0] x, input logic sx, input logic [7:0] y,
                         input logic sy, input bit poke);
    int cycles = 0;
    logic [15:0] expected;
    expected = mul_model(x, sx, y, sy);
    @(negedge clk);
    mul_a = x; mul_b = y; mul_a_signed = sx; mul_b_signed = sy; mul_start = 1'b1;
    @(negedge clk);
    mul_start = 1'b0;
    while (!mul_done && cycles < 20) begin
      if (poke && cycles == 1) begin
        mul_a = ~x; mul_b = ~y; mul_start = 1'b1;
      end
      @(negedge clk);
      mul_start = 1'b0;
      cycles++;
    end
    checks++;
    if (cycles != 5) begin
      failures++;
      $display("FAIL multiplier latency %0d, expected 5", cycles);
    end
    checks++;
    if (mul_product !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL multiplier %h*%h = %h expected %h", x, y, mul_product, expected);
    end else if (poke) n_ignored++;
    n_mode[{sx, sy}]++;
    count_digits(y, sy);
  endtask

  // ---------------- sequence ----------------
  initial begin
    for (int j = 0; j < BLOCK + TAPS; j++) hist[j] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (o1 !== '0 || o2 !== '0 || o3 !== '0 || o4 !== '0 || mul_busy || mul_done) begin
      failures++;
      $display("FAIL reset did not clear the outputs");
    end else n_reset++;
    rst = 1'b0;
    fork
      begin
        fir_hold(8'd3, 8'd3, 8'd5, 8'd2, 32, 31, 30, 37);
        fir_hold(8'd1, 8'd2, 8'd3, 8'd4, 30, 24, 22, 24);
        fir_hold(8'd5, 8'd6, 8'd9, 8'd8, 76, 68, 64, 72);
        repeat (2000) fir_step(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));
        fir_finished = 1;
      end
      begin
        int i;
        i = 0;
        while (!fir_finished) begin
          mul_run(8'($urandom), 1'(i), 8'($urandom), 1'(i >> 1), (i % 5) == 3);
          i++;
        end
      end
    join

    checks++; if (n_reset == 0)   begin failures++; $display("FAIL reset never checked"); end
    checks++; if (n_settled != 3) begin failures++; $display("FAIL settled blocks %0d of 3", n_settled); end
    checks++; if (n_ignored == 0) begin failures++; $display("FAIL no ignored start"); end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("FAIL signedness mode %0d never used", m); end
    end
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (n_digit[d] == 0) begin failures++; $display("FAIL Booth digit %0d never used", d - 2); end
    end
    $display("mechanisms: reset %0d, settled %0d, ignored start %0d, modes %0d/%0d/%0d/%0d, digits %0d/%0d/%0d/%0d/%0d",
             n_reset, n_settled, n_ignored, n_mode[0], n_mode[1], n_mode[2], n_mode[3],
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
