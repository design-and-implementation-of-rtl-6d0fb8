// tb_block_fir8: tests the 8-tap, 4-sample block FIR filter.
//
// Two filters are driven with the same sample stream: one with the default coefficients and
// one with a set that includes the extreme values -128 and 127, so that the 16-bit sums wrap.
// The expected outputs come from a plain sample-by-sample model of
// y[n] = sum h[t] x[n-t] kept in the testbench, computed modulo 2^16, and are compared one
// clock after each block is applied (the filter's latency).
//
// The stream has three parts. First the three input blocks of the reference simulation, each
// held for 16 clocks; with the block held, the filter settles to the printed output values
// (32 31 30 37), (30 24 22 24) and (76 68 64 72), which are checked. Then 3000 random blocks.
// Then a reset in the middle of the stream, after which the filter must act as if all
// earlier samples were zero.
module tb_block_fir8;

  localparam int TAPS = 8, BLOCK = 4, N = 8;
  localparam logic signed [N-1:0] ALT [TAPS] = '{
    -8'sd128, 8'sd127, 8'sd3, -8'sd7, 8'sd100, -8'sd55, 8'sd127, -8'sd128
  };
  localparam logic signed [N-1:0] DEF [TAPS] = '{
    8'sd2, 8'sd1, 8'sd1, 8'sd2, -8'sd1, 8'sd1, 8'sd2, 8'sd2
  };

  logic clk = 1'b0, rst = 1'b1;
  logic signed [N-1:0]   x [BLOCK];
  logic        [2*N-1:0] y_def [BLOCK];
  logic        [2*N-1:0] y_alt [BLOCK];
  int checks = 0, failures = 0;
  int steady_checked = 0, wrap_seen = 0;

  // hist[j] = x[n-j] for the newest block's n, as seen by the model
  int hist [BLOCK + TAPS];

  block_fir8 dut_def (.clk(clk), .rst(rst), .x(x), .y(y_def));
  block_fir8 #(.COEFFS(ALT)) dut_alt (.clk(clk), .rst(rst), .x(x), .y(y_alt));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(input logic signed [N-1:0] h [TAPS], input int k,
                               output bit wrapped);
    int acc = 0;
    for (int t = 0; t < TAPS; t++) acc += int'(h[t]) * hist[k + t];
    wrapped = (acc > 32767) || (acc < -32768);
    return acc;
  endfunction

  // Apply one block on the falling edge, let the rising edge take it, then compare.
  task automatic step(input int s0, input int s1, input int s2, input int s3);
    int  e;
    bit  w;
    @(negedge clk);
    x[0] = N'(s0); x[1] = N'(s1); x[2] = N'(s2); x[3] = N'(s3);
    for (int j = BLOCK + TAPS - 1; j >= BLOCK; j--) hist[j] = hist[j - BLOCK];
    for (int k = 0; k < BLOCK; k++) hist[k] = int'(x[k]);
    @(posedge clk);
    #1;
    for (int k = 0; k < BLOCK; k++) begin
      e = model(DEF, k, w);
      checks++;
      if (y_def[k] !== 16'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL default y[%0d]=%0d expected %0d", k, y_def[k], 16'(e));
      end
      e = model(ALT, k, w);
      if (w) wrap_seen++;
      checks++;
      if (y_alt[k] !== 16'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL alt y[%0d]=%0d expected %0d", k, y_alt[k], 16'(e));
      end
    end
  endtask

  task automatic hold(input int s0, input int s1, input int s2, input int s3,
                      input int o1, input int o2, input int o3, input int o4);
    for (int i = 0; i < 16; i++) step(s0, s1, s2, s3);
    checks++;
    steady_checked++;
    if (y_def[0] != 16'(o1) || y_def[1] != 16'(o2) || y_def[2] != 16'(o3) || y_def[3] != 16'(o4)) begin
      failures++;
      $display("FAIL steady state %0d %0d %0d %0d, expected %0d %0d %0d %0d",
               y_def[0], y_def[1], y_def[2], y_def[3], o1, o2, o3, o4);
    end
  endtask

  initial begin
    for (int j = 0; j < BLOCK + TAPS; j++) hist[j] = 0;
    for (int k = 0; k < BLOCK; k++) x[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    checks++;
    for (int k = 0; k < BLOCK; k++)
      if (y_def[k] !== '0 || y_alt[k] !== '0) begin
        failures++;
        $display("FAIL outputs not cleared by reset");
        break;
      end

    hold(3, 3, 5, 2, 32, 31, 30, 37);
    hold(1, 2, 3, 4, 30, 24, 22, 24);
    hold(5, 6, 9, 8, 76, 68, 64, 72);

    for (int i = 0; i < 3000; i++)
      step(int'($signed(8'($urandom))), int'($signed(8'($urandom))),
           int'($signed(8'($urandom))), int'($signed(8'($urandom))));

    // reset mid-stream: the delay line must be cleared
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < BLOCK; k++) x[k] = '0;   // the next edge shifts in a zero block
    for (int j = 0; j < BLOCK + TAPS; j++) hist[j] = 0;
    for (int i = 0; i < 200; i++)
      step(int'($signed(8'($urandom))), int'($signed(8'($urandom))),
           int'($signed(8'($urandom))), int'($signed(8'($urandom))));

    checks++;
    if (wrap_seen == 0) begin
      failures++;
      $display("FAIL no output wrapped around");
    end
    $display("steady states checked %0d, wrapped outputs %0d", steady_checked, wrap_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
