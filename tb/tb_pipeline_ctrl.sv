// tb_pipeline_ctrl: runs the two-stage pipeline controller with behavioural
// PEs (busy for 73 cycles after start, then a result) and a behavioural BTU
// (busy for a chosen number of cycles). Checks: segment q goes to PE q mod 3,
// starts are exactly M = 27 cycles apart while the BTU keeps up, a PE is
// never started while busy, a buffer slot is never reused before its
// segment is backtracked or dropped, backtracking is in segment order with
// the right slot, start position and coordinates base, and failed segments
// are dropped. A first phase uses BTU walks of 24..27 cycles, a second one
// walks of 36 cycles, so that the PEs have to wait for the BTU.
module tb_pipeline_ctrl;
  import pipebsw_pkg::*;

  localparam int NQ = 48;
  localparam int PE_LAT = 73;

  logic clk = 0, rst_n = 0;
  logic seg_valid = 0, seg_take;
  logic [2:0] seg_idx = 0;
  logic [7:0] read_id = 0;
  logic [2:0] pe_start;
  logic pe_bank [3];
  logic [2:0] pe_busy = 0, pe_done = 0, pe_pass = 0;
  logic [4:0] pe_max_idx [3];
  logic bt_start, bt_done = 0;
  logic [2:0] bt_slot;
  logic [4:0] bt_pos;
  logic [7:0] bt_seg_base, bt_read_id;
  logic [2:0] bt_seg_idx;
  logic rep_valid, rep_pass;
  logic [2:0] rep_seg_idx;
  logic [7:0] rep_read_id;
  logic ev_stagger_wait, ev_pe_wait_btu, ev_btu_wait_pe, ev_drop;

  pipeline_ctrl #(.NPE_P(3), .M(27)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int q_start = 0, q_bt = 0, q_done = 0;
  int start_t [NQ];
  int done_t  [NQ];
  int btend_t [NQ];
  int maxi    [NQ];
  bit passq   [NQ];
  int pe_left [3];
  int pe_q    [3];
  int bt_left = 0, bt_cur = -1;
  int n_stag = 0, n_pew = 0, n_btw = 0, n_drop = 0, n_rep = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void fail(input string msg);
    failures++;
    if (failures < 15) $display("cycle %0d: %s", cyc, msg);
  endfunction

  initial begin
    for (int q = 0; q < NQ; q++) begin
      maxi[q]  = $urandom_range(0, 24);
      passq[q] = !(q % 7 == 5);
      btend_t[q] = -1;
    end
    for (int p = 0; p < 3; p++) begin pe_left[p] = 0; pe_q[p] = -1; end
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  // slicer model: segments always on offer
  always_comb begin
    seg_valid = rst_n && (q_start < NQ);
    seg_idx   = 3'(q_start % 6);
    read_id   = 8'(q_start / 6);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      n_stag <= n_stag + int'(ev_stagger_wait);
      n_pew  <= n_pew + int'(ev_pe_wait_btu);
      n_btw  <= n_btw + int'(ev_btu_wait_pe);
      // ---- PE starts
      if (seg_take) begin
        int p;
        p = q_start % 3;
        checks += 3;
        if (pe_start != 3'(1 << p)) fail($sformatf("segment %0d started on PE mask %b", q_start, pe_start));
        if (pe_busy[p]) fail("PE started while busy");
        if (q_start >= 6 && btend_t[q_start - 6] < 0)
          fail($sformatf("segment %0d reuses the slot of %0d before it was backtracked", q_start, q_start - 6));
        if (q_start > 0 && q_start < 12 && cyc - start_t[q_start - 1] != 27)
          fail($sformatf("segment %0d started %0d cycles after the previous one", q_start, cyc - start_t[q_start - 1]));
        if (q_start > 0 && cyc - start_t[q_start - 1] < 27) fail("stagger shorter than M");
        start_t[q_start] = cyc;
        pe_q[p] = q_start;
        pe_left[p] = PE_LAT;
        q_start <= q_start + 1;
      end else begin
        checks++;
        if (pe_start != 0) fail("PE start without a segment taken");
      end
      // ---- BTU start
      if (bt_start) begin
        checks += 4;
        while (q_bt < NQ && !passq[q_bt]) q_bt++;
        if (bt_cur >= 0) fail("BTU started while busy");
        if (int'(bt_slot) != q_bt % 6) fail($sformatf("BTU slot %0d for segment %0d", bt_slot, q_bt));
        if (int'(bt_pos) != maxi[q_bt]) fail("BTU start position wrong");
        if (int'(bt_seg_base) != 24 * (q_bt % 6) || int'(bt_seg_idx) != q_bt % 6 ||
            int'(bt_read_id) != q_bt / 6) fail("BTU segment tag wrong");
        if (done_t[q_bt] < 0 || done_t[q_bt] > cyc) fail("BTU started before scoring finished");
        bt_cur = q_bt;
        bt_left = (q_bt < 12) ? $urandom_range(23, 26) : 35;
        q_bt++;
      end
      if (ev_drop) begin
        n_drop <= n_drop + 1;
        checks++;
        while (q_bt < NQ && passq[q_bt]) q_bt++;
        if (q_bt >= NQ || passq[q_bt]) fail("drop of a segment that passed");
        else btend_t[q_bt] = cyc;
        q_bt++;
      end
      if (rep_valid) begin
        n_rep <= n_rep + 1;
        checks++;
        if (rep_pass != passq[n_rep] || int'(rep_seg_idx) != n_rep % 6) fail("report wrong");
      end
    end
  end

  // behavioural PEs and BTU, driven on the falling edge
  always @(negedge clk) begin
    pe_done = 0;
    bt_done = 0;
    for (int p = 0; p < 3; p++) begin
      pe_busy[p] = (pe_left[p] > 0);
      if (pe_left[p] > 0) begin
        pe_left[p]--;
        if (pe_left[p] == 0) begin
          pe_done[p] = 1;
          pe_busy[p] = 0;
          pe_max_idx[p] = 5'(maxi[pe_q[p]]);
          pe_pass[p] = passq[pe_q[p]];
          done_t[pe_q[p]] = cyc;
        end
      end else begin
        pe_max_idx[p] = 0;
      end
    end
    if (bt_cur >= 0) begin
      if (bt_left == 0) begin
        bt_done = 1;
        btend_t[bt_cur] = cyc;
        bt_cur = -1;
      end else bt_left--;
    end
  end

  initial begin
    for (int q = 0; q < NQ; q++) done_t[q] = -1;
    wait (rst_n);
    wait (q_start == NQ);
    repeat (400) @(posedge clk);
    checks += 5;
    if (q_bt != NQ) fail($sformatf("only %0d segments left the backtracking stage", q_bt));
    if (n_stag == 0) fail("stagger wait never seen");
    if (n_pew == 0) fail("PE never waited for the BTU");
    if (n_btw == 0) fail("BTU never waited for a PE");
    if (n_drop == 0) fail("no segment dropped");
    $display("stagger waits %0d, PE waits %0d, BTU waits %0d, drops %0d", n_stag, n_pew, n_btw, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
