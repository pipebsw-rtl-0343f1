// error_filter: decides whether a scored segment is worth backtracking.
//
// The error counting mechanism carries, along the best path to every
// position, the number of mismatches, insertions and deletions. After
// scoring, the counts at the chosen maximum of the last L region reach this
// filter. When their sum exceeds THRESH (10, the document's threshold) the
// segment is a low-quality candidate and its backtracking is skipped. The
// document gives the threshold and the rule "sum of errors"; summing all
// three kinds is how this design reads it. The gap difference
// |insertions - deletions| is reported too, since a path that leaves the
// +-12 band needs at least 12 gap errors.
//
// Purely combinational: `pass` follows `errs` in the same cycle.
module error_filter
  import pipebsw_pkg::*;
#(
  parameter int THRESH = 10
) (
  input  errs_t              errs,
  output logic [ERR_W+1:0]   total,
  output logic [ERR_W-1:0]   gap_diff,
  output logic               pass
);

  always_comb begin
    total    = (ERR_W+2)'(errs.mis) + (ERR_W+2)'(errs.ins) + (ERR_W+2)'(errs.del);
    gap_diff = (errs.ins >= errs.del) ? errs.ins - errs.del : errs.del - errs.ins;
    pass     = int'(total) <= THRESH;
  end

endmodule
