// pipebsw_top: banded Smith-Waterman aligner with a two-stage pipeline.
//
// Data flow: reference and read bases enter through two input FIFOs, one
// base per cycle each. The segment slicer gathers 24*NSEG_P + 12 bases of
// each (156 bases and six segments by default) and cuts them into NSEG_P
// overlapping 36-base segments. Segments are scored on
// NPE = 3 processing elements (PEs) taken in turn, with starts staggered by
// M = 27 cycles, so that each PE is reused for a second segment (PE 0 for
// segments 0 and 3, and so on): half the PEs a six-PE layout would need.
// Each PE writes the 2-bit directions of its band, one 50-bit L-region row
// at a time, into one of its two direction buffers, and reports the index
// of the maximum of its last L region with the error counts there. The
// error filter drops segments with more than 10 errors; the other segments
// are walked by the single backtracking unit (BTU), in segment order, as
// soon as each is scored. Scoring of later segments and backtracking of
// earlier ones overlap: these are the two pipeline stages.
//
// Outputs: a report per scored segment (read number, segment number,
// filter decision), the path steps of the BTU (direction and the reference
// and read coordinates within the read, from the segment's last position
// backwards) with an end-of-segment strobe, and event strobes for the
// pipeline's waits and drops. The input ports follow a valid/ready
// handshake. The block structure follows the document; port formats, the
// FIFO depth and the buffer pair per PE are this design's choices.
//
// Some sub-block outputs are left unconnected on purpose and show up as
// unused-signal lint messages: the maximum score of each PE, the filter's
// error total and gap difference, and the BTU busy flag. They are kept on
// the sub-blocks for testing and for a host that wants them.
module pipebsw_top
  import pipebsw_pkg::*;
#(
  parameter int FIFO_DEPTH = 64,
  parameter int THRESH     = 10,
  parameter int M          = BT_M,
  parameter int NSEG_P     = NSEG    // segments per read, 1..8: reads of 24*NSEG_P+12 bases
) (
  input  logic       clk,
  input  logic       rst_n,
  // base streams
  input  logic       ref_in_valid,
  input  base_t      ref_in_base,
  output logic       ref_in_ready,
  input  logic       read_in_valid,
  input  base_t      read_in_base,
  output logic       read_in_ready,
  // per-segment scoring report
  output logic       rep_valid,
  output logic [7:0] rep_read_id,
  output logic [2:0] rep_seg_idx,
  output logic       rep_pass,
  // backtracking path
  output logic       path_valid,
  output dir_t       path_dir,
  output logic [7:0] path_i,
  output logic [7:0] path_j,
  output logic [7:0] path_read_id,
  output logic [2:0] path_seg_idx,
  output logic       path_done,
  output logic       path_band_exit,
  output logic [5:0] path_steps,
  // pipeline events
  output logic       ev_stagger_wait,
  output logic       ev_pe_wait_btu,
  output logic       ev_btu_wait_pe,
  output logic       ev_drop
);

  localparam int NSLOT = 2 * NPE;

  // ---- input FIFOs ------------------------------------------------------
  logic  ref_full, ref_empty, read_full, read_empty, pop;
  base_t ref_head, read_head;

  base_fifo #(.WIDTH(2), .DEPTH(FIFO_DEPTH)) u_ref_fifo (
    .clk, .rst_n, .push(ref_in_valid), .din(ref_in_base), .full(ref_full),
    .pop, .dout(ref_head), .empty(ref_empty));
  base_fifo #(.WIDTH(2), .DEPTH(FIFO_DEPTH)) u_read_fifo (
    .clk, .rst_n, .push(read_in_valid), .din(read_in_base), .full(read_full),
    .pop, .dout(read_head), .empty(read_empty));

  assign ref_in_ready  = !ref_full;
  assign read_in_ready = !read_full;

  // ---- slicer -----------------------------------------------------------
  logic       seg_valid, seg_take;
  logic [2:0] seg_idx;
  logic [7:0] read_id;
  base_t      seg_ref  [PE_LEN];
  base_t      seg_read [PE_LEN];

  segment_slicer #(.NSEG_P(NSEG_P)) u_slicer (
    .clk, .rst_n,
    .ref_empty, .ref_base(ref_head), .read_empty, .read_base(read_head), .pop,
    .seg_valid, .seg_idx, .read_id, .seg_ref, .seg_read, .seg_take);

  // ---- processing elements, buffers, filters ---------------------------
  logic [NPE-1:0]   pe_start, pe_busy, pe_done, pe_pass;
  logic             pe_bank    [NPE];
  logic [4:0]       pe_max_idx [NPE];
  logic [4:0]       bt_rd_addr;
  logic [ROW_W-1:0] buf_rd     [NSLOT];

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    logic             wr_en;
    logic [4:0]       wr_addr;
    logic [ROW_W-1:0] wr_data;
    score_t           max_h;
    errs_t            max_e;
    logic [ERR_W+1:0] err_total;
    logic [ERR_W-1:0] gap_diff;

    processing_element u_pe (
      .clk, .rst_n, .start(pe_start[p]), .ref_seg(seg_ref), .read_seg(seg_read),
      .busy(pe_busy[p]), .wr_en, .wr_addr, .wr_data,
      .done(pe_done[p]), .max_idx(pe_max_idx[p]), .max_h, .max_e);

    error_filter #(.THRESH(THRESH)) u_filter (
      .errs(max_e), .total(err_total), .gap_diff, .pass(pe_pass[p]));

    for (genvar b = 0; b < 2; b++) begin : g_bank
      dir_buffer #(.ENTRIES(ENTRIES), .ROW_W(ROW_W)) u_buf (
        .clk, .wr_en(wr_en && (pe_bank[p] == 1'(b))), .wr_addr, .wr_data,
        .rd_addr(bt_rd_addr), .rd_data(buf_rd[p + NPE * b]));
    end
  end

  // ---- controller and backtracking unit --------------------------------
  logic                     bt_start, bt_done, bt_busy;
  logic [$clog2(NSLOT)-1:0] bt_slot;
  logic [4:0]               bt_pos;
  logic [7:0]               bt_seg_base;

  pipeline_ctrl #(.NPE_P(NPE), .M(M)) u_ctrl (
    .clk, .rst_n,
    .seg_valid, .seg_idx, .read_id, .seg_take,
    .pe_start, .pe_bank, .pe_busy, .pe_done, .pe_max_idx, .pe_pass,
    .bt_start, .bt_slot, .bt_pos, .bt_seg_base, .bt_seg_idx(path_seg_idx),
    .bt_read_id(path_read_id), .bt_done,
    .rep_valid, .rep_seg_idx, .rep_read_id, .rep_pass,
    .ev_stagger_wait, .ev_pe_wait_btu, .ev_btu_wait_pe, .ev_drop);

  btu u_btu (
    .clk, .rst_n, .start(bt_start), .start_pos(bt_pos), .seg_base(bt_seg_base),
    .busy(bt_busy), .rd_addr(bt_rd_addr), .rd_data(buf_rd[bt_slot]),
    .step_valid(path_valid), .step_dir(path_dir), .step_i(path_i), .step_j(path_j),
    .done(bt_done), .band_exit(path_band_exit), .steps(path_steps));

  assign path_done = bt_done;

endmodule
