// bsw_ref_pkg: software reference model of the banded S-W accelerator, for
// the testbenches. It fills one 36 x 36 segment with the plain serial
// recurrence (no lookahead), restricted to the same 13 lanes of 3 x 3 blocks
// as the hardware, with the same tie priority (diagonal > top > left >
// baseline) and error counting, finds the maximum of the last L region and
// walks the backtracking path through the L-region rows. It is written
// independently of the RTL functions so that the two can be compared.
package bsw_ref_pkg;

  localparam int N     = 36;
  localparam int BANDH = 12;
  localparam int LANEH = 6;
  localparam int NEGV  = -256;

  // Results of the last ref_score call. Index 1..N are positions, 0 is the
  // boundary.
  int rh   [N+1][N+1];
  int rmis [N+1][N+1];
  int rins [N+1][N+1];
  int rdel [N+1][N+1];
  int rdir [N+1][N+1];   // 0 match, 1 mismatch, 2 insertion, 3 deletion

  // Backtracking result
  int bt_len;
  int bt_dir  [64];
  int bt_i    [64];
  int bt_j    [64];
  bit bt_exit;

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic void ref_score(input bit [1:0] rf [N], input bit [1:0] rd [N]);
    for (int i = 0; i <= N; i++)
      for (int j = 0; j <= N; j++) begin
        rh[i][j] = 0; rmis[i][j] = 0; rins[i][j] = 0; rdel[i][j] = 0; rdir[i][j] = 0;
      end
    for (int i = 1; i <= N; i++)
      for (int j = 1; j <= N; j++) begin
        int sdiag, stop, sleft, best, s;
        bit eq;
        if (iabs((i-1)/3 - (j-1)/3) > LANEH) begin
          rh[i][j] = NEGV;
          continue;
        end
        eq    = (rf[i-1] == rd[j-1]);
        s     = eq ? 2 : -2;
        sdiag = rh[i-1][j-1] + s;
        stop  = rh[i-1][j] - 1;
        sleft = rh[i][j-1] - 1;
        best  = 0;
        if (sdiag > best) best = sdiag;
        if (stop  > best) best = stop;
        if (sleft > best) best = sleft;
        rh[i][j] = best;
        if (sdiag == best) begin
          rdir[i][j] = eq ? 0 : 1;
          rmis[i][j] = rmis[i-1][j-1] + (eq ? 0 : 1);
          rins[i][j] = rins[i-1][j-1];
          rdel[i][j] = rdel[i-1][j-1];
        end else if (stop == best) begin
          rdir[i][j] = 2;
          rmis[i][j] = rmis[i-1][j];
          rins[i][j] = rins[i-1][j] + 1;
          rdel[i][j] = rdel[i-1][j];
        end else if (sleft == best) begin
          rdir[i][j] = 3;
          rmis[i][j] = rmis[i][j-1];
          rins[i][j] = rins[i][j-1];
          rdel[i][j] = rdel[i][j-1] + 1;
        end else begin
          rdir[i][j] = 1;
          rmis[i][j] = rmis[i-1][j-1] + 1;
          rins[i][j] = rins[i-1][j-1];
          rdel[i][j] = rdel[i-1][j-1];
        end
      end
  endfunction

  // 0-based matrix position of L-region corner c, index p
  function automatic int lpos_i(input int c, input int p);
    return (p > BANDH) ? c - (p - BANDH) : c;
  endfunction
  function automatic int lpos_j(input int c, input int p);
    return (p < BANDH) ? c - (BANDH - p) : c;
  endfunction

  function automatic int ldir(input int c, input int p);
    return rdir[lpos_i(c, p) + 1][lpos_j(c, p) + 1];
  endfunction

  // index of the maximum of the last L region, nearest the diagonal on ties
  function automatic int lmax_idx();
    int bp, bh, p;
    bp = BANDH;
    bh = rh[N][N];
    for (int dd = 1; dd <= BANDH; dd++)
      for (int sg = 0; sg < 2; sg++) begin
        p = (sg == 0) ? BANDH - dd : BANDH + dd;
        if (rh[lpos_i(N-1, p) + 1][lpos_j(N-1, p) + 1] > bh) begin
          bh = rh[lpos_i(N-1, p) + 1][lpos_j(N-1, p) + 1];
          bp = p;
        end
      end
    return bp;
  endfunction

  // Walk back from (corner N-1, index p0) through corners 12..35, one step
  // per position, moving in the matrix coordinates.
  function automatic void ref_backtrack(input int p0);
    int i, j, d;
    i = lpos_i(N-1, p0);
    j = lpos_j(N-1, p0);
    bt_len  = 0;
    bt_exit = 0;
    while (((i > j) ? i : j) >= 12) begin
      if (iabs(j - i) > BANDH) begin
        bt_exit = 1;
        break;
      end
      d = rdir[i+1][j+1];
      bt_dir[bt_len] = d;
      bt_i[bt_len]   = i;
      bt_j[bt_len]   = j;
      bt_len++;
      if (d <= 1) begin i--; j--; end
      else if (d == 2) i--;
      else j--;
    end
  endfunction

endpackage
