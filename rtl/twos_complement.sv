// twos_complement: negates a two's-complement word, -x = ~x + 1.
//
// The increment is done by a carry look-ahead adder adding 1 to the inverted word, so the
// negation has the same short carry path as the multiplier's other additions. The most negative
// value maps to itself, as usual for two's complement. Purely combinational. W must be a
// multiple of 4.
module twos_complement #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] neg_x
);

  logic [W:0] sum;

  cla_adder #(.WIDTH(W)) u_inc (
    .i_add1   (~x),
    .i_add2   (W'(1)),
    .o_result (sum)
  );

  assign neg_x = sum[W-1:0];

endmodule
