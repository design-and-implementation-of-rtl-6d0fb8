// cla_full_adder: the 1-bit cell of a carry look-ahead adder.
//
// It forms the propagate term P = A xor B and the generate term G = A and B, and the sum
// S = P xor C from the carry C that the look-ahead generator hands back. It computes no carry
// of its own; the carry out of this bit is formed by the look-ahead generator from P and G.
// Purely combinational.
module cla_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,   // carry into this bit, from the look-ahead generator
  output logic s,
  output logic p,
  output logic g
);

  always_comb begin
    p = a ^ b;
    g = a & b;
    s = p ^ c;
  end

endmodule
