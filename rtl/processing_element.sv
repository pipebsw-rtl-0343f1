// processing_element: scores one 36 x 36 segment of the banded S-W matrix.
//
// The segment is split into 12 x 12 blocks of 3 x 3 positions. Thirteen
// calc_cell instances form a systolic array along the anti-diagonal: cell g
// owns diagonal lane d = g - 6 (blocks with row - column = d) and is reused
// for every block of its lane. Round k (k = 0..22) processes the blocks on
// block anti-diagonal k; each round takes the cell's three lookahead cycles.
// Neighbouring lanes are active on alternate rounds, so a cell reads its top
// row from lane d-1 and its left column from lane d+1 as they were left by
// the previous round, and its corner H00 from its own H33 of two rounds ago.
// Row 0 and column 0 of the segment start at 0; blocks outside the 13 lanes
// are treated as unreachable. Lanes and the 3-cycle round follow the
// document; the exact lane assignment is this design's choice.
//
// Only positions inside the band |i - j| <= 12 are recorded. They are grouped
// in "L" regions: region c holds the 25 band positions with max(i,j) = c,
// position p = 12 + (j - i). The last 24 regions (c = 12..35; the first 12
// rows overlap the previous segment) form the direction matrix. Region c is
// complete after round 2*(c/3); its 50-bit row is then written to the
// direction buffer (write port, entry c - 12). After the last round the 25
// scores of region 35 are compared and the index of the maximum, its score
// and its error counts are reported (ties go to the position nearest the
// diagonal, a choice of this design).
//
// Timing: `start` is taken while `busy` is low and samples both 36-base
// segments. 69 cycles of scoring and 4 cycles of write-back later `done`
// pulses for one cycle with the result; `busy` falls in the same cycle.
module processing_element
  import pipebsw_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  base_t                  ref_seg  [PE_LEN],
  input  base_t                  read_seg [PE_LEN],
  output logic                   busy,
  // direction buffer write port
  output logic                   wr_en,
  output logic [4:0]             wr_addr,
  output logic [ROW_W-1:0]       wr_data,
  // result of the last L region
  output logic                   done,
  output logic [4:0]             max_idx,
  output score_t                 max_h,
  output errs_t                  max_e
);

  localparam int NB     = PE_LEN / 3;     // 12 blocks per side
  localparam int NROUND = 2 * NB - 1;     // 23 compute rounds
  localparam int LH     = (NCELL - 1) / 2;
  localparam int LAST_K = NROUND + 1;     // round of the final write

  // ---- static geometry of a recorded position (corner c, position p) ----
  function automatic int pos_i(input int c, input int p);
    return (p > BAND) ? c - (p - BAND) : c;
  endfunction
  function automatic int pos_j(input int c, input int p);
    return (p < BAND) ? c - (BAND - p) : c;
  endfunction

  // ---- control ----------------------------------------------------------
  logic [4:0] k;        // round
  logic [1:0] ph;       // phase inside the round
  logic       run;
  base_t      ref_q  [PE_LEN];
  base_t      read_q [PE_LEN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      k   <= '0;
      ph  <= '0;
    end else if (!run) begin
      if (start) begin
        run <= 1'b1;
        k   <= '0;
        ph  <= '0;
      end
    end else if (k == 5'(LAST_K) && ph == 2'd0) begin
      run <= 1'b0;
    end else if (ph == 2'd2) begin
      ph <= '0;
      k  <= k + 1'b1;
    end else begin
      ph <= ph + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!run && start) begin
      ref_q  <= ref_seg;
      read_q <= read_seg;
    end
  end

  assign busy = run;

  // ---- the cell array ---------------------------------------------------
  hpos_t cbot   [NCELL][4];
  hpos_t cright [NCELL][3];
  dir_t  cdir   [NCELL][3][3];

  for (genvar g = 0; g < NCELL; g++) begin : g_cell
    localparam int D = g - LH;
    logic  act;
    int    bi, bj;
    base_t rb [3];
    base_t qb [3];
    hpos_t cin_corner;
    hpos_t cin_top  [3];
    hpos_t cin_left [3];

    always_comb begin
      int s_i, s_j;
      s_i = int'(k) + D;
      s_j = int'(k) - D;
      act = run && (int'(k) < NROUND) && (s_i >= 0) && (s_j >= 0) &&
            (s_i % 2 == 0) && (s_i / 2 < NB) && (s_j / 2 < NB);
      bi  = act ? s_i / 2 : 0;
      bj  = act ? s_j / 2 : 0;
      for (int r = 0; r < 3; r++) begin
        rb[r] = ref_q[3*bi + r];
        qb[r] = read_q[3*bj + r];
      end
      // top row: matrix boundary, lane d-1, or outside the lanes
      for (int c = 0; c < 3; c++) begin
        if (bi == 0)       cin_top[c] = HPOS_ZERO;
        else if (g > 0)    cin_top[c] = cbot[(g > 0) ? g - 1 : 0][c+1];
        else               cin_top[c] = HPOS_NEG;
      end
      // left column: matrix boundary, lane d+1, or outside the lanes
      for (int r = 0; r < 3; r++) begin
        if (bj == 0)            cin_left[r] = HPOS_ZERO;
        else if (g < NCELL - 1) cin_left[r] = cright[(g < NCELL - 1) ? g + 1 : g][r];
        else                    cin_left[r] = HPOS_NEG;
      end
      // corner: boundary, or this lane's own H33 from two rounds before
      cin_corner = (bi == 0 || bj == 0) ? HPOS_ZERO : cbot[g][3];
    end

    calc_cell u_cell (
      .clk    (clk),
      .en     (act),
      .phase  (ph),
      .ref_b  (rb),
      .read_b (qb),
      .corner (cin_corner),
      .top    (cin_top),
      .left   (cin_left),
      .bottom (cbot[g]),
      .right  (cright[g]),
      .dir    (cdir[g])
    );
  end

  // ---- capture of recorded directions and of the last L region ----------
  // The results of round k-1 are captured in phase 0 of round k, while the
  // cells that produced them are idle.
  logic  cap;
  assign cap = run && (ph == 2'd0) && (k != 5'd0);

  dir_t  dir_s  [ENTRIES][LPOS];
  hpos_t last_s [LPOS];

  for (genvar e = 0; e < ENTRIES; e++) begin : g_ent
    for (genvar p = 0; p < LPOS; p++) begin : g_pos
      localparam int C  = e + OVERLAP;
      localparam int I  = pos_i(C, p);
      localparam int J  = pos_j(C, p);
      localparam int G  = I / 3 - J / 3 + LH;
      localparam int KR = I / 3 + J / 3 + 1;   // capture round
      always_ff @(posedge clk)
        if (cap && k == 5'(KR)) dir_s[e][p] <= cdir[G][I % 3][J % 3];
    end
  end

  for (genvar p = 0; p < LPOS; p++) begin : g_last
    localparam int I  = pos_i(PE_LEN - 1, p);
    localparam int J  = pos_j(PE_LEN - 1, p);
    localparam int G  = I / 3 - J / 3 + LH;
    localparam int KR = I / 3 + J / 3 + 1;
    always_ff @(posedge clk)
      if (cap && k == 5'(KR))
        last_s[p] <= (I % 3 == 2) ? cbot[G][J % 3 + 1] : cright[G][I % 3];
  end

  // ---- write-back of completed L regions --------------------------------
  // Regions 3b, 3b+1, 3b+2 complete with round 2b; they are written in
  // phases 1 and 2 of round 2b+1 and phase 0 of round 2b+2.
  int wr_c;
  always_comb begin
    wr_c = -1;
    if (run) begin
      if (k[0] && ph != 2'd0)
        wr_c = 3 * ((int'(k) - 1) / 2) + int'(ph) - 1;
      else if (!k[0] && k != 5'd0 && ph == 2'd0)
        wr_c = 3 * ((int'(k) - 2) / 2) + 2;
    end
    wr_en   = (wr_c >= OVERLAP) && (wr_c < PE_LEN);
    wr_addr = wr_en ? 5'(wr_c - OVERLAP) : 5'd0;
    for (int p = 0; p < LPOS; p++)
      wr_data[2*p +: 2] = dir_s[wr_en ? wr_c - OVERLAP : 0][p];
  end

  // ---- maximum of the last L region -------------------------------------
  logic [4:0] am_idx;
  score_t     am_h;
  errs_t      am_e;
  always_comb begin
    int p;
    am_idx = 5'(BAND);
    am_h   = last_s[BAND].h;
    am_e   = last_s[BAND].e;
    // visit positions in order of distance from the diagonal
    for (int dd = 1; dd <= BAND; dd++) begin
      for (int sgn = 0; sgn < 2; sgn++) begin
        p = (sgn == 0) ? BAND - dd : BAND + dd;
        if (last_s[p].h > am_h) begin
          am_h   = last_s[p].h;
          am_e   = last_s[p].e;
          am_idx = 5'(p);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done    <= 1'b0;
      max_idx <= '0;
      max_h   <= '0;
      max_e   <= '0;
    end else begin
      done <= run && (k == 5'(LAST_K)) && (ph == 2'd0);
      if (run && k == 5'(NROUND) && ph == 2'd1) begin
        max_idx <= am_idx;
        max_h   <= am_h;
        max_e   <= am_e;
      end
    end
  end

endmodule
