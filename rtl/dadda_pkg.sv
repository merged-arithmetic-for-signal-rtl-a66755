// dadda_pkg - elaboration-time schedule for merged bit-product matrix reduction.
//
// A merged matrix holds TERMS N x N bit-product matrices summed column by column
// (column c holds every bit a_i & b_j with i + j == c), optionally plus one
// constant bit in chosen columns. The reduction follows Dadda's rule: with
// d_1 = 2 and d_j = floor(3 * d_(j-1) / 2), find the largest j with some column
// taller than d_j, bring every column down to at most d_j using full adders
// (3-input counters) and half adders (2-input counters), then repeat with j - 1
// until two rows remain. Each stage is one adder delay: an adder only takes bits
// present at the start of its stage, while carries arriving from the next lower
// column in the same stage count against that column's limit.
//
// Two placement rules are offered. The standard rule (fa_first = 0) uses
// floor(e/2) full adders plus one half adder when the excess e is odd; for an 8 x 8
// multiplier it gives 35 full and 7 half adders. The full-adder-first rule
// (fa_first = 1) uses ceil(e/2) full adders and falls back to the standard split
// only when the column lacks the bits for that; for the 8-bit two-term
// multiplier/adder it gives 97 full and 7 half adders over six stages, and 252
// adder modules at 12 bits.
//
// build_schedule runs the whole reduction once and returns it as a table,
// sched[l][c] = {height of column c in matrix l, full adders and half adders
// placed in column c by stage l (matrix l -> l+1)}. Everything here is evaluated
// at elaboration to size and wire generate loops; none of it becomes hardware.
package dadda_pkg;

  localparam int MAXW = 64;   // widest matrix handled (columns), N up to 31
  localparam int MAXS = 10;   // most stages handled (tallest column up to 63)

  typedef logic [7:0] cnt_t;

  typedef struct packed {
    cnt_t height;   // bits in the column at the start of the stage
    cnt_t nfa;      // full adders placed in the column by the stage
    cnt_t nha;      // half adders placed in the column by the stage
  } cell_t;

  typedef cell_t [MAXW-1:0] level_t;
  typedef level_t [MAXS:0]  sched_t;

  // Number of bits a single N x N bit-product matrix puts in column c.
  function automatic int pp_count(int n, int c);
    int lo, hi;
    lo = (c - n + 1 > 0) ? c - n + 1 : 0;
    hi = (c < n - 1) ? c : n - 1;
    return (hi >= lo) ? hi - lo + 1 : 0;
  endfunction

  // Lowest row index i of a bit a_i & b_(c-i) in column c.
  function automatic int pp_lo(int n, int c);
    return (c - n + 1 > 0) ? c - n + 1 : 0;
  endfunction

  // Height of column c in the initial matrix.
  function automatic int init_height(int n, int terms, logic [MAXW-1:0] cbits, int c);
    return terms * pp_count(n, c) + int'(cbits[c]);
  endfunction

  // Tallest column of the initial matrix.
  function automatic int max_height(int n, int terms, int w, logic [MAXW-1:0] cbits);
    int hmax;
    hmax = 0;
    for (int k = 0; k < w; k++)
      if (init_height(n, terms, cbits, k) > hmax) hmax = init_height(n, terms, cbits, k);
    return hmax;
  endfunction

  // Dadda limit d_j for j >= 1: d_1 = 2, d_j = floor(3 d_(j-1) / 2).
  function automatic int dadda_limit(int j);
    int d;
    d = 2;
    for (int k = 1; k < j; k++) d = (3 * d) / 2;
    return d;
  endfunction

  // Number of stages: the number of limits d_j below the tallest column.
  function automatic int num_stages(int n, int terms, int w, logic [MAXW-1:0] cbits);
    int hmax, ns;
    hmax = max_height(n, terms, w, cbits);
    ns = 0;
    while (dadda_limit(ns + 1) < hmax) ns++;
    return ns;
  endfunction

  // The whole schedule as a table (see the header).
  function automatic sched_t build_schedule(int n, int terms, int w,
                                            logic [MAXW-1:0] cbits, bit fa_first);
    sched_t s;
    int h [MAXW];
    int ns, d, cin, e, fa, ha, nh;
    for (int st = 0; st <= MAXS; st++)
      for (int k = 0; k < MAXW; k++) s[st][k] = '0;
    ns = num_stages(n, terms, w, cbits);
    for (int k = 0; k < MAXW; k++) h[k] = (k < w) ? init_height(n, terms, cbits, k) : 0;
    for (int st = 0; st <= ns && st <= MAXS; st++) begin
      for (int k = 0; k < MAXW; k++) s[st][k].height = cnt_t'(h[k]);
      if (st < ns) begin
        d = dadda_limit(ns - st);
        cin = 0;
        for (int k = 0; k < w; k++) begin
          e = h[k] + cin - d;
          fa = 0;
          ha = 0;
          if (e > 0) begin
            if (fa_first) begin
              fa = (e + 1) / 2;
              if (3 * fa > h[k]) begin
                fa = e / 2;
                ha = e % 2;
              end
            end else begin
              fa = e / 2;
              ha = e % 2;
            end
          end
          s[st][k].nfa = cnt_t'(fa);
          s[st][k].nha = cnt_t'(ha);
          nh = h[k] - 2 * fa - ha + cin;
          cin = fa + ha;
          h[k] = nh;
        end
      end
    end
    return s;
  endfunction

  // Total full adders (ha = 0) or half adders (ha = 1) in a schedule.
  function automatic int total_adders(sched_t s, int ns, int w, bit ha);
    int sum;
    sum = 0;
    for (int st = 0; st < ns; st++)
      for (int k = 0; k < w; k++) sum += ha ? int'(s[st][k].nha) : int'(s[st][k].nfa);
    return sum;
  endfunction

  // True when each stage's adders only use bits present in their column and the
  // final matrix has at most two rows.
  function automatic bit schedule_ok(sched_t s, int ns, int w);
    if (ns > MAXS || w > MAXW) return 1'b0;
    for (int st = 0; st < ns; st++)
      for (int k = 0; k < w; k++)
        if (3 * int'(s[st][k].nfa) + 2 * int'(s[st][k].nha) > int'(s[st][k].height))
          return 1'b0;
    for (int k = 0; k < w; k++)
      if (s[ns][k].height > 2) return 1'b0;
    return 1'b1;
  endfunction

endpackage
