// calc_cell: one 3 x 3 calculation cell of the banded S-W scoring array.
//
// The cell fills a 3 x 3 block of the scoring matrix in three clock cycles
// using lookahead: three positions per cycle, in the balanced schedule
//   phase 0: H11, H12, H21   (H12 and H21 by lookahead past H11)
//   phase 1: H13, H22, H31   (four candidates each, from registered values)
//   phase 2: H23, H32, H33   (H33 by lookahead past H23 and H32)
// A lookahead position compares all candidate paths in parallel instead of
// waiting for its neighbour: the best non-baseline candidate of H11 (a shared
// partial maximum) minus W1 is the left candidate of H12 and the top
// candidate of H21, and the partial maxima of H23 and H32 minus W1 are the
// top and left candidates of H33. Scores are identical to the serial
// recurrence; directions and error counts follow the same priority
// (diagonal > top > left > baseline). The schedule and the sharing follow the
// document; the tie priority is this design's choice.
//
// Each position also carries the error counts (mismatch, insertion,
// deletion) of its best path: a position inherits the counts of the source
// it took its score from and adds one of the matching kind. A baseline 0 is
// counted as a mismatch.
//
// Interface: while `en` is high the cell computes the positions of `phase`
// (0, 1, 2 on consecutive cycles). The boundary inputs (corner H00, top row
// H01..H03, left column H10..H30) and the bases must stay stable for all
// three phases. Results are registered; after the phase-2 edge `bottom`
// (H30, H31, H32, H33, H30 being the latched left input), `right`
// (H13, H23, H33) and `dir` hold the block until the next phase 0.
module calc_cell
  import pipebsw_pkg::*;
(
  input  logic        clk,
  input  logic        en,
  input  logic [1:0]  phase,
  input  base_t       ref_b  [3],   // reference bases of rows 1..3
  input  base_t       read_b [3],   // read bases of columns 1..3
  input  hpos_t       corner,       // H00
  input  hpos_t       top    [3],   // H01, H02, H03
  input  hpos_t       left   [3],   // H10, H20, H30
  output hpos_t       bottom [4],   // H30, H31, H32, H33
  output hpos_t       right  [3],   // H13, H23, H33
  output dir_t        dir    [3][3] // dir[r][c] of position (r+1, c+1)
);

  localparam score_t W = score_t'(GAP);

  hpos_t hq [3][3];   // registered block results, hq[r][c] = H(r+1,c+1)
  dir_t  dq [3][3];
  hpos_t h30_q;

  // substitution score of each position
  function automatic score_t s(input int r, input int c);
    return subst(ref_b[r], read_b[c]);
  endfunction

  function automatic logic eqb(input int r, input int c);
    return ref_b[r] == read_b[c];
  endfunction

  // ---------------- phase 0: H11, H12, H21 --------------------------------
  score_t   d11, t11, l11, m11;
  cellres_t r11, r12, r21;
  always_comb begin
    d11 = corner.h + s(0, 0);
    t11 = top[0].h - W;
    l11 = left[0].h - W;
    m11 = smax(smax(d11, t11), l11);       // shared partial maximum
    r11 = pick(d11, t11, l11, eqb(0, 0), corner.e, top[0].e, left[0].e);
    // H12: diagonal H01+S, top H02-W, left via H11's candidates
    r12 = pick(top[0].h + s(0, 1), top[1].h - W, m11 - W, eqb(0, 1),
               top[0].e, top[1].e, r11.e);
    // H21: diagonal H10+S, top via H11's candidates, left H20-W
    r21 = pick(left[0].h + s(1, 0), m11 - W, left[1].h - W, eqb(1, 0),
               left[0].e, r11.e, left[1].e);
  end

  // ---------------- phase 1: H13, H22, H31 --------------------------------
  cellres_t r13, r22, r31;
  always_comb begin
    r13 = pick(top[1].h + s(0, 2), top[2].h - W, hq[0][1].h - W, eqb(0, 2),
               top[1].e, top[2].e, hq[0][1].e);
    r22 = pick(hq[0][0].h + s(1, 1), hq[0][1].h - W, hq[1][0].h - W, eqb(1, 1),
               hq[0][0].e, hq[0][1].e, hq[1][0].e);
    r31 = pick(left[1].h + s(2, 0), hq[1][0].h - W, left[2].h - W, eqb(2, 0),
               left[1].e, hq[1][0].e, left[2].e);
  end

  // ---------------- phase 2: H23, H32, H33 --------------------------------
  score_t   d23, t23, l23, m23, d32, t32, l32, m32;
  cellres_t r23, r32, r33;
  always_comb begin
    d23 = hq[0][1].h + s(1, 2);
    t23 = hq[0][2].h - W;
    l23 = hq[1][1].h - W;
    m23 = smax(smax(d23, t23), l23);       // shared with H33
    d32 = hq[1][0].h + s(2, 1);
    t32 = hq[1][1].h - W;
    l32 = hq[2][0].h - W;
    m32 = smax(smax(d32, t32), l32);       // shared with H33
    r23 = pick(d23, t23, l23, eqb(1, 2), hq[0][1].e, hq[0][2].e, hq[1][1].e);
    r32 = pick(d32, t32, l32, eqb(2, 1), hq[1][0].e, hq[1][1].e, hq[2][0].e);
    r33 = pick(hq[1][1].h + s(2, 2), m23 - W, m32 - W, eqb(2, 2),
               hq[1][1].e, r23.e, r32.e);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      unique case (phase)
        2'd0: begin
          hq[0][0] <= '{h: r11.h, e: r11.e};  dq[0][0] <= r11.d;
          hq[0][1] <= '{h: r12.h, e: r12.e};  dq[0][1] <= r12.d;
          hq[1][0] <= '{h: r21.h, e: r21.e};  dq[1][0] <= r21.d;
          h30_q    <= left[2];
        end
        2'd1: begin
          hq[0][2] <= '{h: r13.h, e: r13.e};  dq[0][2] <= r13.d;
          hq[1][1] <= '{h: r22.h, e: r22.e};  dq[1][1] <= r22.d;
          hq[2][0] <= '{h: r31.h, e: r31.e};  dq[2][0] <= r31.d;
        end
        2'd2: begin
          hq[1][2] <= '{h: r23.h, e: r23.e};  dq[1][2] <= r23.d;
          hq[2][1] <= '{h: r32.h, e: r32.e};  dq[2][1] <= r32.d;
          hq[2][2] <= '{h: r33.h, e: r33.e};  dq[2][2] <= r33.d;
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    bottom[0] = h30_q;
    for (int c = 0; c < 3; c++) bottom[c+1] = hq[2][c];
    for (int r = 0; r < 3; r++) right[r] = hq[r][2];
    dir = dq;
  end

endmodule
