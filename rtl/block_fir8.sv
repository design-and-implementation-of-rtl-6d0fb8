// block_fir8: block-based direct-form FIR filter, 8 taps, 4 samples per clock by default.
//
//   y[n] = h[0] x[n] + h[1] x[n-1] + ... + h[TAPS-1] x[n-TAPS+1]
//
// Every clock the filter takes a block of BLOCK consecutive samples, x[0] being the newest
// (x[n]) and x[BLOCK-1] the oldest (x[n-BLOCK+1]), and produces the BLOCK matching outputs,
// y[0] = y[n] down to y[BLOCK-1] = y[n-BLOCK+1]. The block is processed in parallel: each
// output has its own row of TAPS radix-4 Booth multipliers and a direct-form chain of
// TAPS - 1 carry look-ahead adders, so BLOCK x TAPS multipliers in all. The TAPS - 1 samples
// before the current block are held in a register delay line, which shifts by BLOCK samples
// per clock; together with the current block it forms a sliding window w[j] = x[n-j].
//
// Arithmetic is two's complement: N-bit samples times N-bit coefficients give 2N-bit
// products, and the sums are kept to 2N bits (they wrap if the coefficients are large enough
// to overflow). The coefficients are the COEFFS parameter, h[0] first.
//
// Timing: one block in and one block out per clock. The outputs are registered, so y holds the
// result for the block presented before the previous rising edge: latency is one clock.
// rst is synchronous and active high; it clears the delay line (the filter then behaves as if
// all earlier samples were zero) and the outputs.
//
// Given for this filter: 8 taps, blocks of 4 samples, direct form, Booth multipliers and CLA
// adders, 8-bit inputs and 16-bit outputs. This design's own choices: the fully parallel
// sliding-window structure, two's complement wrap-around arithmetic, the registered outputs,
// the reset, and the default coefficients (only their pair sums h[m] + h[m+4] = 1, 2, 3, 4 are
// fixed by the reference simulation; see fir_pkg).
module block_fir8 #(
  parameter int unsigned TAPS  = 8,
  parameter int unsigned BLOCK = 4,
  parameter int unsigned N     = 8,
  parameter logic signed [N-1:0] COEFFS [TAPS] = '{
    8'sd2, 8'sd1, 8'sd1, 8'sd2, -8'sd1, 8'sd1, 8'sd2, 8'sd2
  }
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [N-1:0]   x [BLOCK],   // x[0] newest sample
  output logic        [2*N-1:0] y [BLOCK]    // y[k] is the output at the time of x[k]
);

  localparam int unsigned HIST = TAPS - 1;         // samples kept from earlier blocks
  localparam int unsigned WIN  = BLOCK + HIST;     // sliding window length

  logic signed [N-1:0]   hist [HIST];             // hist[j] = x[n-BLOCK-j]
  logic signed [N-1:0]   win  [WIN];              // win[j]  = x[n-j]
  logic        [2*N-1:0] y_comb [BLOCK];

  for (genvar j = 0; j < WIN; j++) begin : g_win
    if (j < BLOCK) begin : g_cur
      assign win[j] = x[j];
    end else begin : g_old
      assign win[j] = hist[j-BLOCK];
    end
  end

  // One row per output: TAPS products, summed along a direct-form adder chain.
  for (genvar k = 0; k < BLOCK; k++) begin : g_out
    logic [2*N-1:0] prod [TAPS];
    logic [2*N-1:0] acc  [TAPS];

    for (genvar t = 0; t < TAPS; t++) begin : g_tap
      booth_r4_mult #(.N(N)) u_mul (.a(win[k+t]), .b(COEFFS[t]), .product(prod[t]));
    end

    assign acc[0] = prod[0];
    for (genvar t = 1; t < TAPS; t++) begin : g_add
      logic [2*N:0] s;
      cla_adder #(.WIDTH(2*N)) u_add (.i_add1(acc[t-1]), .i_add2(prod[t]), .o_result(s));
      assign acc[t] = s[2*N-1:0];
    end

    assign y_comb[k] = acc[TAPS-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < HIST; j++) hist[j] <= '0;
      for (int k = 0; k < BLOCK; k++) y[k]  <= '0;
    end else begin
      // The window shifts by one block: the newest HIST samples become the history.
      for (int j = 0; j < HIST; j++) hist[j] <= win[j];
      for (int k = 0; k < BLOCK; k++) y[k]  <= y_comb[k];
    end
  end

endmodule
