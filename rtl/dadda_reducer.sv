// dadda_reducer - reduces a merged bit-product matrix to an equivalent two-row
// matrix with a network of full and half adders.
//
// The matrix is the column-wise union of TERMS N x N bit-product matrices
// (pp[t][i][j] has weight 2^(i+j)) plus one constant bit in every column c where
// CONST[c] is set. With TERMS = 1 this is the reduction of an ordinary
// multiplier; with TERMS = 2 it is the single shared reduction of a two-term
// multiplier/adder. The matrix is W columns wide and is summed modulo 2^W:
// carries out of column W-1 are dropped.
//
// The reduction runs in stages, each one adder delay deep, under Dadda's height
// limits d_j (2, 3, 4, 6, 9, 13, 19, ...): stage k brings every column down to the
// next lower limit. Which adders go where is computed at elaboration by
// dadda_pkg::build_schedule; FA_FIRST selects the placement rule (see dadda_pkg).
// Inside a column of the next matrix the rows are ordered: full-adder sums,
// half-adder sums, bits passed down unchanged, then carries from the column below.
// The numbers of adders and stages are exported as NUM_FA, NUM_HA and NUM_STAGES.
//
// Interface: pp in, row0 and row1 out; row0 + row1 (mod 2^W) equals the sum of all
// matrix bits at their weights. Row bits of columns that end with fewer than two
// bits are constant 0. Purely combinational, NUM_STAGES adder delays.
module dadda_reducer
  import dadda_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned TERMS    = 2,
  parameter int unsigned W        = 2 * N + 1,
  parameter logic [W-1:0] CONST   = '0,
  parameter bit          FA_FIRST = 1'b1
) (
  input  logic [TERMS-1:0][N-1:0][N-1:0] pp,
  output logic [W-1:0]                   row0,
  output logic [W-1:0]                   row1
);
  localparam logic [MAXW-1:0] CBITS = MAXW'(CONST);
  localparam int     NUM_STAGES = num_stages(N, TERMS, W, CBITS);
  localparam int     MAXH       = max_height(N, TERMS, W, CBITS);
  localparam int     HMAX       = (MAXH > 2) ? MAXH : 2;
  localparam sched_t SCHED      = build_schedule(N, TERMS, W, CBITS, FA_FIRST);
  localparam int     NUM_FA     = total_adders(SCHED, NUM_STAGES, W, 1'b0);
  localparam int     NUM_HA     = total_adders(SCHED, NUM_STAGES, W, 1'b1);

  if (W >= MAXW || !schedule_ok(SCHED, NUM_STAGES, W)) begin : g_bad_schedule
    $error("dadda_reducer: no valid reduction schedule for these parameters");
  end

  for (genvar l = 0; l <= NUM_STAGES; l++) begin : g_lvl
    logic [HMAX-1:0] col [W];

    if (l == 0) begin : g_init
      // Initial matrix: bit products of every term, then the constant bit.
      for (genvar c = 0; c < W; c++) begin : g_col
        localparam int CNT = pp_count(N, c);
        localparam int LO  = pp_lo(N, c);
        localparam int H   = TERMS * CNT + int'(CONST[c]);
        for (genvar t = 0; t < TERMS; t++) begin : g_term
          for (genvar k = 0; k < CNT; k++) begin : g_bit
            assign col[c][t * CNT + k] = pp[t][LO + k][c - LO - k];
          end
        end
        if (CONST[c]) begin : g_const
          assign col[c][TERMS * CNT] = 1'b1;
        end
        for (genvar r = H; r < HMAX; r++) begin : g_zero
          assign col[c][r] = 1'b0;
        end
      end
    end else begin : g_stage
      // One reduction stage: matrix l-1 in, matrix l out.
      for (genvar c = 0; c < W; c++) begin : g_col
        localparam int H    = int'(SCHED[l-1][c].height);
        localparam int NFA  = int'(SCHED[l-1][c].nfa);
        localparam int NHA  = int'(SCHED[l-1][c].nha);
        localparam int HN   = int'(SCHED[l][c].height);
        localparam int PASS = H - 3 * NFA - 2 * NHA;
        // Where this column's carries land in column c+1 of matrix l.
        localparam int H1   = int'(SCHED[l-1][c+1].height);
        localparam int NFA1 = int'(SCHED[l-1][c+1].nfa);
        localparam int NHA1 = int'(SCHED[l-1][c+1].nha);
        localparam int DEST = H1 - 2 * NFA1 - NHA1;

        for (genvar k = 0; k < NFA; k++) begin : g_fa
          logic cy;
          full_adder u_fa (
            .a  (g_lvl[l-1].col[c][3*k]),
            .b  (g_lvl[l-1].col[c][3*k+1]),
            .ci (g_lvl[l-1].col[c][3*k+2]),
            .s  (col[c][k]),
            .co (cy)
          );
          if (c + 1 < W) begin : g_carry
            assign col[c+1][DEST + k] = cy;
          end
        end
        for (genvar k = 0; k < NHA; k++) begin : g_ha
          logic cy;
          half_adder u_ha (
            .a  (g_lvl[l-1].col[c][3*NFA + 2*k]),
            .b  (g_lvl[l-1].col[c][3*NFA + 2*k + 1]),
            .s  (col[c][NFA + k]),
            .co (cy)
          );
          if (c + 1 < W) begin : g_carry
            assign col[c+1][DEST + NFA + k] = cy;
          end
        end
        for (genvar r = 0; r < PASS; r++) begin : g_pass
          assign col[c][NFA + NHA + r] = g_lvl[l-1].col[c][3*NFA + 2*NHA + r];
        end
        for (genvar r = HN; r < HMAX; r++) begin : g_zero
          assign col[c][r] = 1'b0;
        end
      end
    end
  end

  // The final matrix has at most two rows.
  always_comb begin
    for (int c = 0; c < W; c++) begin
      row0[c] = g_lvl[NUM_STAGES].col[c][0];
      row1[c] = g_lvl[NUM_STAGES].col[c][1];
    end
  end
endmodule
