// btu: backtracking unit.
//
// Walks the alignment path of one segment through its direction matrix
// buffer, one position per clock cycle, from the last entry (23) to the
// first. Two pointers locate the 2-bit direction: the entry pointer selects
// the buffer row (L region c = entry + 12) and the position pointer the
// column p inside it, p = 12 + (j - i). At start the entry pointer is 23 and
// the position pointer the index of the maximum of the last L region. After
// reading direction d the pointers move (this follows from the L-region
// geometry):
//   match / mismatch (upper left): entry - 1, same position
//   insertion (top):  position + 1; entry - 1 only if p < 12 (row arm)
//   deletion (left):  position - 1; entry - 1 only if p > 12 (column arm)
// The walk ends when the entry pointer drops below 0. A path has 24..36
// steps; a walk of n steps takes n + 1 cycles, one of them to load the
// pointers (the document counts 24..36 cycles). If the position
// pointer would leave 0..24 the path has left the band: the walk stops and
// `band_exit` is reported with `done`.
//
// Each step is output registered as `step_valid` with its direction and its
// matrix coordinates (reference index i, read index j), offset by `seg_base`
// so that consecutive segments give coordinates in the whole read. Joining
// the steps with the bases is left to the consumer. The pointer rules and
// the end condition follow the document; the output format is this design's.
//
// The range assertion at the end samples rst_n on the clock, which Verilator
// reports as SYNCASYNCNET; it does not affect the circuit.
module btu
  import pipebsw_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [4:0]       start_pos,
  input  logic [7:0]       seg_base,
  output logic             busy,
  // direction buffer read port
  output logic [4:0]       rd_addr,
  input  logic [ROW_W-1:0] rd_data,
  // path output
  output logic             step_valid,
  output dir_t             step_dir,
  output logic [7:0]       step_i,
  output logic [7:0]       step_j,
  output logic             done,
  output logic             band_exit,
  output logic [5:0]       steps
);

  logic signed [6:0] eptr, pptr, n_eptr, n_pptr;
  logic [7:0]        base_q;
  logic [5:0]        cnt;
  dir_t              d;
  logic [7:0]        ci, li, lj;

  assign rd_addr = busy ? eptr[4:0] : 5'd0;

  always_comb begin
    d      = dir_t'(rd_data[2*pptr[4:0] +: 2]);
    n_eptr = eptr;
    n_pptr = pptr;
    unique case (d)
      DIR_MATCH, DIR_MISMATCH: n_eptr = eptr - 7'sd1;
      DIR_INS: begin
        n_pptr = pptr + 7'sd1;
        if (pptr < 7'(BAND)) n_eptr = eptr - 7'sd1;
      end
      DIR_DEL: begin
        n_pptr = pptr - 7'sd1;
        if (pptr > 7'(BAND)) n_eptr = eptr - 7'sd1;
      end
    endcase
    // matrix coordinates of the current position inside the segment
    ci = 8'(eptr) + 8'(OVERLAP);
    li = (pptr > 7'(BAND)) ? ci - 8'(pptr - 7'(BAND)) : ci;
    lj = (pptr < 7'(BAND)) ? ci - 8'(7'(BAND) - pptr) : ci;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      eptr       <= '0;
      pptr       <= '0;
      base_q     <= '0;
      cnt        <= '0;
      step_valid <= 1'b0;
      step_dir   <= DIR_MATCH;
      step_i     <= '0;
      step_j     <= '0;
      done       <= 1'b0;
      band_exit  <= 1'b0;
      steps      <= '0;
    end else begin
      step_valid <= 1'b0;
      done       <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          eptr   <= 7'(ENTRIES - 1);
          pptr   <= 7'(start_pos);
          base_q <= seg_base;
          cnt    <= '0;
        end
      end else begin
        step_valid <= 1'b1;
        step_dir   <= d;
        step_i     <= base_q + li;
        step_j     <= base_q + lj;
        cnt        <= cnt + 1'b1;
        eptr       <= n_eptr;
        pptr       <= n_pptr;
        if (n_eptr < 0 || n_pptr < 0 || n_pptr > 7'(LPOS - 1)) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          band_exit <= !(n_eptr < 0);
          steps     <= cnt + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    assert (!rst_n || !busy || (pptr >= 0 && pptr < 7'(LPOS)))
      else $error("btu: position pointer %0d outside the L region", pptr);
  end

endmodule
