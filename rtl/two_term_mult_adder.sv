// two_term_mult_adder - merged two-term multiplier/adder: p = xa*ya + xb*yb, or
// p = xa*ya - xb*yb with SUBTRACT = 1, for unsigned N-bit operands.
//
// Instead of finishing two products and adding them, both bit-product matrices are
// stacked into one matrix and reduced together by a single Dadda-style adder
// network to two rows, which one carry lookahead adder then sums. For N = 8 the
// network has 97 full and 7 half adders in six stages and the final adder is 16
// bits wide, as in the merged design this implements.
//
// Subtraction is this design's own addition: the second array uses NAND gates,
// so its bits sum to (2^N-1)^2 - xb*yb, and the constant -(2^N-1)^2 (mod 2^(2N+1))
// is added to the same matrix as one extra bit in each column where it has a one.
// The result is then the 2N+1-bit two's complement difference.
//
// Interface: p has 2N+1 bits; it is unsigned for addition and two's complement
// for subtraction. Rows 0..2N-1 go through a 2N-bit carry lookahead adder; bit 2N
// is that adder's carry out added (mod 2) to whatever the rows hold in column 2N.
// Purely combinational: one gate, NUM_STAGES adder and one lookahead delay.
module two_term_mult_adder #(
  parameter int unsigned N        = 8,
  parameter bit          SUBTRACT = 1'b0,
  parameter bit          FA_FIRST = 1'b1,
  parameter int unsigned CLA_BLK  = 5
) (
  input  logic [N-1:0]   xa,
  input  logic [N-1:0]   ya,
  input  logic [N-1:0]   xb,
  input  logic [N-1:0]   yb,
  output logic [2*N:0]   p
);
  localparam int unsigned W = 2 * N + 1;
  // -(2^N - 1)^2 modulo 2^W: removes the offset the NAND array adds.
  localparam longint unsigned OFFSET = ((longint'(1) << N) - 1) * ((longint'(1) << N) - 1);
  localparam logic [W-1:0] CORR = SUBTRACT ? W'(-OFFSET) : '0;

  logic [1:0][N-1:0][N-1:0] pp;
  logic [W-1:0]             row0, row1;
  logic [2*N-1:0]           low_sum;
  logic                     low_cout;

  bit_product_array #(.N(N), .INVERT(1'b0)) u_pp_a (.a(xa), .b(ya), .pp(pp[0]));
  bit_product_array #(.N(N), .INVERT(SUBTRACT)) u_pp_b (.a(xb), .b(yb), .pp(pp[1]));

  dadda_reducer #(
    .N        (N),
    .TERMS    (2),
    .W        (W),
    .CONST    (CORR),
    .FA_FIRST (FA_FIRST)
  ) u_red (
    .pp   (pp),
    .row0 (row0),
    .row1 (row1)
  );

  cla_adder #(.WIDTH(2 * N), .BLK(CLA_BLK)) u_cla (
    .a    (row0[2*N-1:0]),
    .b    (row1[2*N-1:0]),
    .cin  (1'b0),
    .sum  (low_sum),
    .cout (low_cout)
  );

  assign p = {low_cout ^ row0[2*N] ^ row1[2*N], low_sum};
endmodule
