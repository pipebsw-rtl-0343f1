// segment_slicer: turns the read and reference base streams into PE segments.
//
// Bases arrive one per cycle from each input FIFO (a reference base and a
// read base are taken together when both FIFOs have one). LEN = 24*NSEG_P +
// 12 bases (156 for the default NSEG_P = 6) make one read and its
// reference segment. They are collected in one
// of two sequence slots while the other slot is being handed out, so that
// loading the next read overlaps the scoring of the current one.
// A full slot is sliced into NSEG_P segments of PE_LEN = 36 bases; segment
// s starts at base 24*s, so consecutive segments overlap by 12 bases (the
// 12 x 12 overlap between PEs). The segment on offer is shown on
// `seg_ref`/`seg_read` with `seg_valid`, its number in `seg_idx` and a running
// read number in `read_id`; `seg_take` accepts it. Taking the last segment
// frees the slot. The segment geometry follows the document; the base-per-
// cycle loading, the two slots and the read length are this design's
// choices. NSEG_P may be 1..8 (seg_idx is 3 bits), so reads up to 204
// bases.
module segment_slicer
  import pipebsw_pkg::*;
#(
  parameter int NSEG_P = NSEG
) (
  input  logic       clk,
  input  logic       rst_n,
  // input FIFO side
  input  logic       ref_empty,
  input  base_t      ref_base,
  input  logic       read_empty,
  input  base_t      read_base,
  output logic       pop,
  // segment side
  output logic       seg_valid,
  output logic [2:0] seg_idx,
  output logic [7:0] read_id,
  output base_t      seg_ref  [PE_LEN],
  output base_t      seg_read [PE_LEN],
  input  logic       seg_take
);

  localparam int LEN = SEG_STEP * NSEG_P + OVERLAP;

  base_t      ref_mem  [2][LEN];
  base_t      read_mem [2][LEN];
  logic [1:0] full_q;            // slot holds a complete read
  logic       wslot, rslot;      // slot being loaded / handed out
  logic [7:0] wcnt;              // bases loaded into wslot
  logic [2:0] sidx;
  logic [7:0] rid;

  assign pop       = !full_q[wslot] && !ref_empty && !read_empty;
  assign seg_valid = full_q[rslot];
  assign seg_idx   = sidx;
  assign read_id   = rid;

  always_comb begin
    for (int b = 0; b < PE_LEN; b++) begin
      seg_ref[b]  = ref_mem[rslot][SEG_STEP * int'(sidx) + b];
      seg_read[b] = read_mem[rslot][SEG_STEP * int'(sidx) + b];
    end
  end

  always_ff @(posedge clk)
    if (pop) begin
      ref_mem[wslot][wcnt]  <= ref_base;
      read_mem[wslot][wcnt] <= read_base;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= '0;
      wslot  <= 1'b0;
      rslot  <= 1'b0;
      wcnt   <= '0;
      sidx   <= '0;
      rid    <= '0;
    end else begin
      if (pop) begin
        if (wcnt == 8'(LEN - 1)) begin
          wcnt          <= '0;
          full_q[wslot] <= 1'b1;
          wslot         <= !wslot;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      if (seg_take && seg_valid) begin
        if (sidx == 3'(NSEG_P - 1)) begin
          sidx          <= '0;
          full_q[rslot] <= 1'b0;
          rslot         <= !rslot;
          rid           <= rid + 1'b1;
        end else begin
          sidx <= sidx + 1'b1;
        end
      end
    end
  end

endmodule
