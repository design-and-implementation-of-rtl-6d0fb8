// booth_pp_gen: one partial product of a radix-4 (modified) Booth multiplier.
//
// Three overlapping multiplier bits {b(2i+1), b(2i), b(2i-1)} select a digit of -2..+2:
//   000, 111 -> 0     001, 010 -> +A     011 -> +2A     100 -> -2A     101, 110 -> -A
// The multiplicand A is sign-extended to the full product width, doubled by a one-bit shift
// when the digit is +-2, and negated by the 2's complement circuit when the digit is negative.
// The caller shifts the result left by 2i. Purely combinational.
module booth_pp_gen #(
  parameter int unsigned N = 8          // operand width; the partial product is 2N bits
) (
  input  logic signed [N-1:0]   a,      // multiplicand
  input  logic        [2:0]     bits,   // {b(2i+1), b(2i), b(2i-1)}
  output logic        [2*N-1:0] pp
);

  logic [2*N-1:0] a_ext, mag, mag_neg;
  logic           neg;

  assign a_ext = (2*N)'(a);             // sign extension

  always_comb begin
    unique case (bits)
      3'b001, 3'b010: begin mag = a_ext;        neg = 1'b0; end
      3'b011:         begin mag = a_ext << 1;   neg = 1'b0; end
      3'b100:         begin mag = a_ext << 1;   neg = 1'b1; end
      3'b101, 3'b110: begin mag = a_ext;        neg = 1'b1; end
      default:        begin mag = '0;           neg = 1'b0; end
    endcase
  end

  twos_complement #(.W(2*N)) u_neg (.x(mag), .neg_x(mag_neg));

  assign pp = neg ? mag_neg : mag;

endmodule
