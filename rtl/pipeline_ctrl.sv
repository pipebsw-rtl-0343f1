// pipeline_ctrl: two-stage (scoring / backtracking) pipeline controller.
//
// Segments are numbered in arrival order q = 0, 1, 2, ... Segment q is
// scored on PE q mod NPE and its directions go to buffer slot
// q mod (2*NPE) (each PE has two buffers used in turn, slot = PE + NPE*bank).
// Consecutive segment starts are at least M cycles apart: with M = 27 and a
// PE scoring time below 3*M, three PEs take six segments in turn, PE 0
// scoring segment 3 while the single backtracking unit (BTU) works through
// the earlier segments. Backtracking runs in segment order: as soon as the
// next segment in order has been scored, the BTU starts on it if the error
// filter passed it, or the segment is dropped without backtracking.
//
// A segment waits to start until (a) the slicer offers it, (b) M cycles
// have passed since the previous start, (c) its PE is idle and (d) its
// buffer slot has been backtracked or dropped. (d) is where the PE waits for
// a slow BTU; the BTU waits for the PE when its next segment is still being
// scored. Both waits, the M stagger and the drops are brought out as
// one-cycle event strobes. The M stagger, the PE reuse and the serial BTU
// follow the document; the two buffers per PE and the slot bookkeeping are
// this design's choice, needed because a BTU walk may take up to 36 > M
// cycles.
//
// Notes on tool messages: bt_seg_base = 24 * segment is always a multiple of
// 8, so its three low bits are constant 0 after synthesis. Verilator's
// SYNCASYNCNET warning on rst_n comes from the `disable iff (!rst_n)` of the
// a_one_done assertion, which samples the asynchronous reset on the clock;
// it has no effect on the circuit.
module pipeline_ctrl
  import pipebsw_pkg::*;
#(
  parameter int NPE_P = 3,
  parameter int M     = 27
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // slicer
  input  logic                   seg_valid,
  input  logic [2:0]             seg_idx,
  input  logic [7:0]             read_id,
  output logic                   seg_take,
  // processing elements
  output logic [NPE_P-1:0]       pe_start,
  output logic                   pe_bank  [NPE_P],
  input  logic [NPE_P-1:0]       pe_busy,
  input  logic [NPE_P-1:0]       pe_done,
  input  logic [4:0]             pe_max_idx [NPE_P],
  input  logic [NPE_P-1:0]       pe_pass,
  // backtracking unit
  output logic                   bt_start,
  output logic [$clog2(2*NPE_P)-1:0] bt_slot,
  output logic [4:0]             bt_pos,
  output logic [7:0]             bt_seg_base,
  output logic [2:0]             bt_seg_idx,
  output logic [7:0]             bt_read_id,
  input  logic                   bt_done,
  // per-segment report, when the segment leaves the scoring stage
  output logic                   rep_valid,
  output logic [2:0]             rep_seg_idx,
  output logic [7:0]             rep_read_id,
  output logic                   rep_pass,
  // events
  output logic                   ev_stagger_wait,
  output logic                   ev_pe_wait_btu,
  output logic                   ev_btu_wait_pe,
  output logic                   ev_drop
);

  localparam int NSLOT = 2 * NPE_P;
  localparam int SW    = $clog2(NSLOT);
  localparam int PW    = (NPE_P > 1) ? $clog2(NPE_P) : 1;

  typedef enum logic [1:0] {S_FREE, S_SCORING, S_READY, S_BACKTRACK} slot_st_t;

  slot_st_t   st       [NSLOT];
  logic [4:0] slot_pos [NSLOT];
  logic       slot_ok  [NSLOT];
  logic [2:0] slot_seg [NSLOT];
  logic [7:0] slot_rid [NSLOT];
  logic [SW-1:0] pe_slot [NPE_P];

  logic [SW-1:0] q_slot;      // slot of the next segment to start
  logic [PW-1:0] q_pe;        // PE of the next segment to start
  logic [SW-1:0] b_slot;      // slot of the next segment to backtrack
  logic          bt_active;
  logic [7:0]    since;       // cycles since the last start (saturating)
  logic          first;

  logic stag_ok, pe_ok, slot_free, go;
  assign stag_ok   = first || (int'(since) >= M - 1);
  assign pe_ok     = !pe_busy[q_pe];
  assign slot_free = st[q_slot] == S_FREE;
  assign go        = seg_valid && stag_ok && pe_ok && slot_free;
  assign seg_take  = go;

  // the PE samples the offered segment in the same cycle the slicer lets it go
  always_comb begin
    pe_start = '0;
    if (go) pe_start[q_pe] = 1'b1;
  end

  logic bt_go, drop;
  assign bt_go = !bt_active && st[b_slot] == S_READY && slot_ok[b_slot];
  assign drop  = !bt_active && st[b_slot] == S_READY && !slot_ok[b_slot];

  assign ev_stagger_wait = seg_valid && !stag_ok;
  assign ev_pe_wait_btu  = seg_valid && stag_ok && pe_ok && !slot_free;
  assign ev_btu_wait_pe  = !bt_active && st[b_slot] == S_SCORING;
  assign ev_drop         = drop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSLOT; s++) begin
        st[s]       <= S_FREE;
        slot_pos[s] <= '0;
        slot_ok[s]  <= 1'b0;
        slot_seg[s] <= '0;
        slot_rid[s] <= '0;
      end
      for (int p = 0; p < NPE_P; p++) begin
        pe_slot[p] <= '0;
        pe_bank[p] <= 1'b0;
      end
      q_slot      <= '0;
      q_pe        <= '0;
      b_slot      <= '0;
      bt_active   <= 1'b0;
      since       <= '0;
      first       <= 1'b1;
      bt_start    <= 1'b0;
      bt_slot     <= '0;
      bt_pos      <= '0;
      bt_seg_base <= '0;
      bt_seg_idx  <= '0;
      bt_read_id  <= '0;
      rep_valid   <= 1'b0;
      rep_seg_idx <= '0;
      rep_read_id <= '0;
      rep_pass    <= 1'b0;
    end else begin
      bt_start  <= 1'b0;
      rep_valid <= 1'b0;
      if (since != 8'hff) since <= since + 1'b1;

      // ---- stage 1: start a segment on its PE
      if (go) begin
        pe_bank[q_pe]    <= (int'(q_slot) >= NPE_P);
        pe_slot[q_pe]    <= q_slot;
        st[q_slot]       <= S_SCORING;
        slot_seg[q_slot] <= seg_idx;
        slot_rid[q_slot] <= read_id;
        q_slot <= (int'(q_slot) == NSLOT - 1) ? '0 : q_slot + 1'b1;
        q_pe   <= (int'(q_pe) == NPE_P - 1) ? '0 : q_pe + 1'b1;
        since  <= '0;
        first  <= 1'b0;
      end

      // ---- scoring finished: the slot is ready for backtracking
      for (int p = 0; p < NPE_P; p++) begin
        if (pe_done[p]) begin
          st[pe_slot[p]]       <= S_READY;
          slot_pos[pe_slot[p]] <= pe_max_idx[p];
          slot_ok[pe_slot[p]]  <= pe_pass[p];
          rep_valid            <= 1'b1;
          rep_seg_idx          <= slot_seg[pe_slot[p]];
          rep_read_id          <= slot_rid[pe_slot[p]];
          rep_pass             <= pe_pass[p];
        end
      end

      // ---- stage 2: backtracking in segment order
      if (bt_go) begin
        bt_active   <= 1'b1;
        bt_start    <= 1'b1;
        bt_slot     <= b_slot;
        bt_pos      <= slot_pos[b_slot];
        bt_seg_base <= 8'(SEG_STEP * int'(slot_seg[b_slot]));
        bt_seg_idx  <= slot_seg[b_slot];
        bt_read_id  <= slot_rid[b_slot];
        st[b_slot]  <= S_BACKTRACK;
      end else if (drop) begin
        st[b_slot] <= S_FREE;
        b_slot <= (int'(b_slot) == NSLOT - 1) ? '0 : b_slot + 1'b1;
      end
      if (bt_done && bt_active) begin
        bt_active   <= 1'b0;
        st[bt_slot] <= S_FREE;
        b_slot <= (int'(b_slot) == NSLOT - 1) ? '0 : b_slot + 1'b1;
      end
    end
  end

  // two PEs never finish in the same cycle: starts are M cycles apart
  a_one_done: assert property (@(posedge clk) disable iff (!rst_n) $countones(pe_done) <= 1)
    else $error("pipeline_ctrl: two PEs finished together");

endmodule
