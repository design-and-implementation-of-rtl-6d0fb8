// tb_fir_direct4: the block filter configured as a plain 4-tap direct-form FIR.
//
// With BLOCK = 1 and TAPS = 4 the block filter reduces to the textbook direct form: one sample
// in and one output out per clock, a delay line of three samples, four multipliers and a chain
// of three adders (coefficients b0..b3). 2000 random samples are applied and every output is
// compared, one clock later, with y[n] = b0 x[n] + b1 x[n-1] + b2 x[n-2] + b3 x[n-3]
// computed in the testbench.
module tb_fir_direct4;

  localparam int TAPS = 4, N = 8;
  localparam logic signed [N-1:0] B [TAPS] = '{8'sd17, -8'sd3, 8'sd90, -8'sd128};

  logic clk = 1'b0, rst = 1'b1;
  logic signed [N-1:0]   x [1];
  logic        [2*N-1:0] y [1];
  int checks = 0, failures = 0;
  int past [TAPS];

  block_fir8 #(.TAPS(TAPS), .BLOCK(1), .N(N), .COEFFS(B)) dut (.clk(clk), .rst(rst), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc;
    x[0] = '0;
    for (int t = 0; t < TAPS; t++) past[t] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      x[0] = N'($urandom);
      for (int t = TAPS - 1; t > 0; t--) past[t] = past[t-1];
      past[0] = int'(x[0]);
      @(posedge clk);
      #1;
      acc = 0;
      for (int t = 0; t < TAPS; t++) acc += int'(B[t]) * past[t];
      checks++;
      if (y[0] !== 16'(acc)) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d expected %0d", y[0], 16'(acc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
