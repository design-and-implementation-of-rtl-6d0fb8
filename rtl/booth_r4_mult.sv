// booth_r4_mult: combinational radix-4 (modified) Booth multiplier for signed operands.
//
// The N-bit multiplier b is recoded into N/2 signed digits of -2..+2, each read from three
// overlapping bits, so an N x N product needs only N/2 partial products instead of N. Each
// partial product comes from a booth_pp_gen (digit select, doubling, 2's complement), is
// shifted left by two bits per digit position and added to the running sum by a 2N-bit carry
// look-ahead adder: N/2 - 1 adders in a chain. The 2N-bit product of two N-bit two's-complement
// numbers is exact. This is the multiplier used in every tap of the FIR filter; it has no
// clock and its delay is that of one partial-product generator plus the adder chain.
// N must be even and 2N a multiple of 4. The recoding into N/2 partial products and the use of
// CLA adders and a 2's complement circuit follow the reference design; the recoding table is the
// standard one, and the chain order of the adders and signed-only operands are choices made here.
module booth_r4_mult #(
  parameter int unsigned N = 8
) (
  input  logic signed [N-1:0]   a,        // multiplicand
  input  logic signed [N-1:0]   b,        // multiplier, Booth-recoded
  output logic signed [2*N-1:0] product
);

  localparam int unsigned ND = N / 2;     // Booth digits = partial products

  logic [N:0]     b_ext;                  // b with the implicit b(-1) = 0 below bit 0
  logic [2*N-1:0] pp  [ND];
  logic [2*N-1:0] sum [ND];

  assign b_ext = {b, 1'b0};

  for (genvar i = 0; i < ND; i++) begin : g_pp
    logic [2*N-1:0] pp_raw;
    booth_pp_gen #(.N(N)) u_pp (.a(a), .bits(b_ext[2*i +: 3]), .pp(pp_raw));
    assign pp[i] = pp_raw << (2 * i);
  end

  assign sum[0] = pp[0];

  for (genvar i = 1; i < ND; i++) begin : g_add
    logic [2*N:0] s;
    cla_adder #(.WIDTH(2*N)) u_add (.i_add1(sum[i-1]), .i_add2(pp[i]), .o_result(s));
    assign sum[i] = s[2*N-1:0];
  end

  assign product = sum[ND-1];

endmodule
