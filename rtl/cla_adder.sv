// cla_adder - two-level carry lookahead adder that sums the last two rows of a
// reduced bit-product matrix.
//
// The WIDTH bits are cut into blocks of BLK bits (the top block may be shorter).
// Level one: every bit forms generate g = a & b and propagate p = a ^ b; every
// block forms its group generate G and group propagate P as flat sum-of-products
// terms. Level two: the carry into each block is a flat sum-of-products of the
// lower blocks' G and P and of cin. Inside a block, each bit's carry is again a
// flat sum-of-products of the block's g, p and the block carry-in. No carry
// ripples from bit to bit, so the delay is a few gate levels at any width.
// The two-level structure and the 5-bit blocks follow the description of the
// 15-bit adder; the block size is a parameter. Combinational.
module cla_adder #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned BLK   = 5
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NBLK = (WIDTH + BLK - 1) / BLK;

  logic [WIDTH-1:0] g, p, c;
  logic [NBLK-1:0]  bg, bp;    // block generate / propagate
  logic [NBLK:0]    bc;        // carry into each block, bc[NBLK] = carry out

  // Level one: bit and block generate / propagate.
  always_comb begin
    g = a & b;
    p = a ^ b;
    for (int k = 0; k < NBLK; k++) begin
      logic term;
      bg[k] = 1'b0;
      bp[k] = 1'b1;
      for (int i = k * BLK; i < (k + 1) * BLK && i < WIDTH; i++) begin
        bp[k] = bp[k] & p[i];
        term = g[i];
        for (int m = i + 1; m < (k + 1) * BLK && m < WIDTH; m++) term = term & p[m];
        bg[k] = bg[k] | term;
      end
    end
  end

  // Level two: carry into each block from the block terms and cin.
  always_comb begin
    for (int k = 0; k <= NBLK; k++) begin
      logic term;
      bc[k] = cin;
      for (int m = 0; m < k; m++) bc[k] = bc[k] & bp[m];
      for (int j = 0; j < k; j++) begin
        term = bg[j];
        for (int m = j + 1; m < k; m++) term = term & bp[m];
        bc[k] = bc[k] | term;
      end
    end
  end

  // Carries inside each block from the bit terms and the block carry-in.
  always_comb begin
    for (int k = 0; k < NBLK; k++) begin
      for (int i = k * BLK; i < (k + 1) * BLK && i < WIDTH; i++) begin
        logic term;
        c[i] = bc[k];
        for (int m = k * BLK; m < i; m++) c[i] = c[i] & p[m];
        for (int j = k * BLK; j < i; j++) begin
          term = g[j];
          for (int m = j + 1; m < i; m++) term = term & p[m];
          c[i] = c[i] | term;
        end
      end
    end
    sum  = p ^ c;
    cout = bc[NBLK];
  end
endmodule
