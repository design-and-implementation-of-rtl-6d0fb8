// fir_top: top level of the FIR filter design.
//
// It holds the 8-tap block FIR filter with the port names of its block interface: four 8-bit
// input samples xi0..xi3 per clock (xi0 the newest) and four 16-bit outputs o1..o4, o1 being
// the output at the time of xi0 and o4 that of xi3. Outputs follow the inputs by one clock.
//
// Beside it sits the iterative radix-4 Booth multiplier as a standalone 8 x 8 unit with
// signed/unsigned operand control and a start/busy/done handshake (ports mul_*). It shares
// only clk and rst with the filter, whose taps use the combinational Booth multiplier.
// rst is synchronous and active high for both.
module fir_top (
  input  logic                       clk,
  input  logic                       rst,
  // block FIR filter
  input  logic [fir_pkg::SAMPLE_W-1:0] xi0,
  input  logic [fir_pkg::SAMPLE_W-1:0] xi1,
  input  logic [fir_pkg::SAMPLE_W-1:0] xi2,
  input  logic [fir_pkg::SAMPLE_W-1:0] xi3,
  output logic [fir_pkg::OUT_W-1:0]    o1,
  output logic [fir_pkg::OUT_W-1:0]    o2,
  output logic [fir_pkg::OUT_W-1:0]    o3,
  output logic [fir_pkg::OUT_W-1:0]    o4,
  // standalone iterative Booth multiplier
  input  logic                         mul_start,
  input  logic [fir_pkg::SAMPLE_W-1:0] mul_a,
  input  logic [fir_pkg::SAMPLE_W-1:0] mul_b,
  input  logic                         mul_a_signed,
  input  logic                         mul_b_signed,
  output logic                         mul_busy,
  output logic                         mul_done,
  output logic [fir_pkg::OUT_W-1:0]    mul_product
);

  import fir_pkg::*;

  sample_t x [BLOCK];
  out_t    y [BLOCK];

  assign x[0] = sample_t'(xi0);
  assign x[1] = sample_t'(xi1);
  assign x[2] = sample_t'(xi2);
  assign x[3] = sample_t'(xi3);

  block_fir8 #(
    .TAPS   (TAPS),
    .BLOCK  (BLOCK),
    .N      (SAMPLE_W),
    .COEFFS (DEFAULT_COEFFS)
  ) u_fir (
    .clk (clk),
    .rst (rst),
    .x   (x),
    .y   (y)
  );

  assign o1 = y[0];
  assign o2 = y[1];
  assign o3 = y[2];
  assign o4 = y[3];

  booth_seq_mult #(.N(SAMPLE_W)) u_mul (
    .clk      (clk),
    .rst      (rst),
    .start    (mul_start),
    .a        (mul_a),
    .b        (mul_b),
    .a_signed (mul_a_signed),
    .b_signed (mul_b_signed),
    .busy     (mul_busy),
    .done     (mul_done),
    .product  (mul_product)
  );

endmodule
