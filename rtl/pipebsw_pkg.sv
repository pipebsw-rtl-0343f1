// pipebsw_pkg: constants, types and small functions shared by the banded
// Smith-Waterman (S-W) accelerator.
//
// Scoring follows the recurrence H(i,j) = max(H(i-1,j-1)+S, H(i-1,j)-W1,
// H(i,j-1)-W1, 0) with S = +2 on a match, -2 on a mismatch and W1 = 1, the
// values of the worked example this design is built around. Rows i index the
// reference, columns j the read. Geometry: a processing element (PE) covers a
// 36 x 36 block of the matrix, consecutive PEs overlap by 12 bases, the
// recorded band is +-12 around the main diagonal, and one "L" region (all band
// positions with max(i,j) = c) holds 25 positions of 2 bits.
//
// Direction codes (2 bits per position): match and mismatch both point to the
// upper-left, insertion to the top, deletion to the left. A score that falls
// to the 0 baseline is recorded as a mismatch, as in a global alignment.
// The base encoding (A,C,G,T = 0..3) and the score width are this design's
// own choices.
package pipebsw_pkg;

  // ---- scoring ------------------------------------------------------------
  localparam int SCORE_W   = 10;               // signed score width
  localparam int ERR_W     = 7;                // width of each error counter
  localparam int MATCH     = 2;                // S(i,j) on equal bases
  localparam int MISMATCH  = -2;               // S(i,j) on different bases
  localparam int GAP       = 1;                // W1
  // Score used for positions outside the computed lanes: low enough never to
  // win, high enough that subtracting 2*W1 does not wrap.
  localparam int NEG_SCORE = -(1 << (SCORE_W - 2));

  // ---- geometry -----------------------------------------------------------
  localparam int PE_LEN    = 36;               // bases per PE segment
  localparam int OVERLAP   = 12;               // overlap between two PEs
  localparam int SEG_STEP  = PE_LEN - OVERLAP; // 24 new bases per segment
  localparam int BAND      = 12;               // recorded band half-width
  localparam int LPOS      = 2 * BAND + 1;     // 25 positions per L region
  localparam int ENTRIES   = PE_LEN - OVERLAP; // 24 L regions per buffer
  localparam int ROW_W     = 2 * LPOS;         // 50-bit buffer entry
  localparam int NSEG      = 6;                // segments per read
  localparam int SEQ_LEN   = SEG_STEP * NSEG + OVERLAP; // 156 bases
  localparam int NCELL     = 13;               // cells per PE
  localparam int NPE       = 3;                // instantiated PEs
  localparam int BT_M      = 27;               // segment start stagger m

  typedef logic signed [SCORE_W-1:0] score_t;
  typedef logic [ERR_W-1:0]          cnt_t;
  typedef logic [1:0]                base_t;

  typedef enum logic [1:0] {
    DIR_MATCH    = 2'b00,   // upper-left, equal bases
    DIR_MISMATCH = 2'b01,   // upper-left, different bases or baseline 0
    DIR_INS      = 2'b10,   // from the top
    DIR_DEL      = 2'b11    // from the left
  } dir_t;

  // Error counts carried along the best path to a position.
  typedef struct packed {
    cnt_t mis;
    cnt_t ins;
    cnt_t del;
  } errs_t;

  // A scored position: score and the errors on its path.
  typedef struct packed {
    score_t h;
    errs_t  e;
  } hpos_t;

  localparam hpos_t HPOS_ZERO = '{h: '0, e: '0};
  localparam hpos_t HPOS_NEG  = '{h: score_t'(NEG_SCORE), e: '0};

  function automatic score_t subst(input base_t a, input base_t b);
    return (a == b) ? score_t'(MATCH) : score_t'(MISMATCH);
  endfunction

  function automatic score_t smax(input score_t a, input score_t b);
    return (a >= b) ? a : b;
  endfunction

  // Result of one position: score, direction and error counts, chosen from
  // its three sources with the priority diagonal > top > left > baseline.
  // The caller passes the best diagonal, top and left candidates already
  // reduced, so that the lookahead trees can share partial maxima.
  typedef struct packed {
    score_t h;
    dir_t   d;
    errs_t  e;
  } cellres_t;

  function automatic cellres_t pick(input score_t cd, input score_t ct,
                                    input score_t cl, input logic eq,
                                    input errs_t ed, input errs_t et,
                                    input errs_t el);
    cellres_t r;
    score_t   v;
    v = smax(smax(cd, ct), smax(cl, score_t'(0)));
    r.h = v;
    if (cd == v) begin
      r.d = eq ? DIR_MATCH : DIR_MISMATCH;
      r.e = ed;
      if (!eq) r.e.mis = ed.mis + 1'b1;
    end else if (ct == v) begin
      r.d = DIR_INS;
      r.e = et;
      r.e.ins = et.ins + 1'b1;
    end else if (cl == v) begin
      r.d = DIR_DEL;
      r.e = el;
      r.e.del = el.del + 1'b1;
    end else begin
      // baseline: recorded and counted as a mismatch on the diagonal
      r.d = DIR_MISMATCH;
      r.e = ed;
      r.e.mis = ed.mis + 1'b1;
    end
    return r;
  endfunction

endpackage
