// bit_product_array - the N x N array of 2-input AND gates that forms the
// bit-product matrix of an unsigned multiplication.
//
// pp[i][j] = a[i] & b[j] carries weight 2^(i+j). With INVERT = 1 each gate is a
// NAND instead: pp[i][j] = ~(a[i] & b[j]). Summed over the matrix, the inverted
// bits equal (2^N - 1)^2 - a*b, which lets a reduction tree subtract a product
// once that constant is removed from the same matrix (see two_term_mult_adder).
// The AND array follows the multiplier's first step; the NAND option is this
// design's way of forming the minus sign of the real part. Combinational, one
// gate delay.
module bit_product_array #(
  parameter int unsigned N      = 8,
  parameter bit          INVERT = 1'b0
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp   // pp[i][j], weight 2^(i+j)
);
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        pp[i][j] = (a[i] & b[j]) ^ INVERT;
  end
endmodule
