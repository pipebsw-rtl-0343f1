// pipebsw_e2e: end-to-end run of one pipebsw_top instance with NS segments
// per read (reads of 24*NS + 12 bases), used by tb_pipebsw_top.
//
// Streams NREAD reference/read pairs through the input FIFOs: most reads are
// copies of their reference with mismatches, insertions and deletions, some
// are unrelated and must be dropped by the error filter. For every segment
// the reference model scores the same 36-base slices; the bench checks the
// filter decision of each report, and for every backtracked segment the
// whole path (direction and coordinates of every step). It also checks that
// the segments of the first read leave the scoring stage exactly M cycles
// apart and that reads are never issued faster than NS*M cycles, and counts
// how often each mechanism of the design happened: PE reuse, the M stagger,
// a PE waiting for the BTU, the BTU waiting for a PE, filter drops,
// backtracking and input back-pressure. One that never happens counts as a
// failure. `finished` rises when the run is over; `checks` and `failures`
// are read by the enclosing testbench.
module pipebsw_e2e #(
  parameter int NS    = 6,
  parameter int NREAD = 14
) (
  output int checks,
  output int failures,
  output bit finished
);
  import pipebsw_pkg::*;
  import bsw_ref_pkg::*;

  localparam int LEN = SEG_STEP * NS + OVERLAP;

  logic clk = 0, rst_n = 0;
  logic ref_in_valid = 0, read_in_valid = 0, ref_in_ready, read_in_ready;
  base_t ref_in_base = 0, read_in_base = 0;
  logic rep_valid, rep_pass, path_valid, path_done, path_band_exit;
  logic [7:0] rep_read_id, path_i, path_j, path_read_id;
  logic [2:0] rep_seg_idx, path_seg_idx;
  dir_t path_dir;
  logic [5:0] path_steps;
  logic ev_stagger_wait, ev_pe_wait_btu, ev_btu_wait_pe, ev_drop;

  // the default read length runs the top exactly as delivered, with no
  // parameter list
  if (NS == NSEG) begin : g_default
    pipebsw_top dut (.*);
  end else begin : g_sized
    pipebsw_top #(.NSEG_P(NS)) dut (.*);
  end

  always #5 clk = ~clk;

  base_t rseq [NREAD][LEN];
  base_t qseq [NREAD][LEN];

  int cyc = 0;
  int n_rep = 0, n_pass = 0, n_paths = 0, n_reuse = 0;
  int n_stag = 0, n_pew = 0, n_btw = 0, n_drop = 0, n_bp = 0, n_steps = 0;
  int last_rep_t = -1;
  int got_dir [64];
  int got_i   [64];
  int got_j   [64];
  int k = 0;
  int seg0_t [NREAD];     // cycle of each read's first segment report

  initial begin
    checks = 0;
    failures = 0;
    finished = 0;
  end

  function automatic void fail(input string msg);
    failures++;
    if (failures < 15) $display("[%0d segments] cycle %0d: %s", NS, cyc, msg);
  endfunction

  // score segment s of read r in the reference model
  function automatic void model_segment(input int r, input int s);
    bit [1:0] rf [N];
    bit [1:0] rd [N];
    for (int b = 0; b < N; b++) begin
      rf[b] = rseq[r][SEG_STEP*s + b];
      rd[b] = qseq[r][SEG_STEP*s + b];
    end
    ref_score(rf, rd);
  endfunction

  function automatic bit model_pass();
    int p, i, j;
    p = lmax_idx();
    i = lpos_i(N-1, p) + 1;
    j = lpos_j(N-1, p) + 1;
    return (rmis[i][j] + rins[i][j] + rdel[i][j]) <= 10;
  endfunction

  // ---- stimulus ---------------------------------------------------------
  initial begin
    for (int r = 0; r < NREAD; r++) begin
      int si;
      for (int b = 0; b < LEN; b++) rseq[r][b] = base_t'($urandom);
      if (r == 2 || r == 5) begin
        // unrelated read: fails the filter
        for (int b = 0; b < LEN; b++) qseq[r][b] = base_t'($urandom);
      end else if (r >= 6) begin
        // paired gap runs: in every 24 bases the read misses two reference
        // bases and later carries two extra ones. Each pair adds two steps
        // to the backtracking path, so the BTU falls behind the PEs.
        si = 0;
        for (int j = 0; j < LEN; j++) begin
          if (j % SEG_STEP == 6 && si < LEN - 2) si += 2;
          if (j % SEG_STEP == 16 || j % SEG_STEP == 17) begin
            qseq[r][j] = base_t'($urandom);
            continue;
          end
          qseq[r][j] = (si < LEN) ? rseq[r][si] : base_t'($urandom);
          si++;
        end
      end else begin
        // random mismatches, insertions and deletions
        si = 0;
        for (int j = 0; j < LEN; j++) begin
          int x;
          x = $urandom_range(0, 99);
          if (x < 5 && si < LEN - 1) si++;                                  // deletion
          if (x >= 5 && x < 10) begin qseq[r][j] = base_t'($urandom); continue; end // insertion
          qseq[r][j] = (si < LEN) ? rseq[r][si] : base_t'($urandom);
          if (x >= 10 && x < 13) qseq[r][j] = qseq[r][j] + 2'd1;                  // mismatch
          si++;
        end
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // two independent streams: bases on most cycles at first, with a pause of
  // the read stream so that the reference FIFO fills up, then on every cycle
  int ref_n = 0, read_n = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      ref_in_valid  = (ref_n < NREAD * LEN) && (cyc >= 200 || $urandom_range(0, 19) != 0);
      read_in_valid = (read_n < NREAD * LEN) && (cyc >= 200 || $urandom_range(0, 19) != 0) &&
                      !(cyc >= 50 && cyc < 200);
      if (ref_n < NREAD * LEN) ref_in_base = rseq[ref_n / LEN][ref_n % LEN];
      if (read_n < NREAD * LEN) read_in_base = qseq[read_n / LEN][read_n % LEN];
    end
  end

  // ---- monitors ---------------------------------------------------------
  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (ref_in_valid && ref_in_ready) ref_n <= ref_n + 1;
      if (read_in_valid && read_in_ready) read_n <= read_n + 1;
      if ((ref_in_valid && !ref_in_ready) || (read_in_valid && !read_in_ready)) n_bp <= n_bp + 1;
      n_stag <= n_stag + int'(ev_stagger_wait);
      n_pew  <= n_pew + int'(ev_pe_wait_btu);
      n_btw  <= n_btw + int'(ev_btu_wait_pe);
      n_drop <= n_drop + int'(ev_drop);

      if (rep_valid) begin
        checks += 2;
        if (int'(rep_read_id) != n_rep / NS || int'(rep_seg_idx) != n_rep % NS)
          fail($sformatf("report for read %0d segment %0d, expected %0d/%0d",
                         rep_read_id, rep_seg_idx, n_rep / NS, n_rep % NS));
        model_segment(int'(rep_read_id), int'(rep_seg_idx));
        if (rep_pass != model_pass())
          fail($sformatf("read %0d segment %0d: filter %0d expected %0d",
                         rep_read_id, rep_seg_idx, rep_pass, model_pass()));
        if (rep_seg_idx == 0) seg0_t[int'(rep_read_id)] = cyc;
        if (rep_pass) n_pass++;
        if (rep_seg_idx >= 3) n_reuse++;     // segments 3..5 run on reused PEs
        // first read: scoring results leave exactly M cycles apart
        if (n_rep > 0 && n_rep < NS) begin
          checks++;
          if (cyc - last_rep_t != BT_M)
            fail($sformatf("segment %0d finished %0d cycles after the previous one", n_rep, cyc - last_rep_t));
        end
        last_rep_t = cyc;
        n_rep++;
      end

      if (path_valid) begin
        if (k < 64) begin
          got_dir[k] = int'(path_dir);
          got_i[k]   = int'(path_i);
          got_j[k]   = int'(path_j);
        end
        k++;
        n_steps++;
      end
      if (path_done) begin
        int base;
        model_segment(int'(path_read_id), int'(path_seg_idx));
        ref_backtrack(lmax_idx());
        base = SEG_STEP * int'(path_seg_idx);
        checks += 2;
        if (k != bt_len || int'(path_steps) != bt_len || path_band_exit != bt_exit)
          fail($sformatf("read %0d segment %0d: %0d steps expected %0d", path_read_id,
                         path_seg_idx, k, bt_len));
        else begin
          bit bad;
          bad = 0;
          for (int t = 0; t < bt_len; t++)
            if (got_dir[t] != bt_dir[t] || got_i[t] != bt_i[t] + base || got_j[t] != bt_j[t] + base)
              bad = 1;
          if (bad) fail($sformatf("read %0d segment %0d: path differs", path_read_id, path_seg_idx));
        end
        k = 0;
        n_paths++;
      end
    end
  end

  initial begin
    wait (rst_n);
    wait (n_rep == NREAD * NS);
    repeat (200) @(posedge clk);
    checks += 9;
    if (n_paths != n_pass) fail($sformatf("%0d paths for %0d passing segments", n_paths, n_pass));
    if (n_reuse == 0)  fail("no PE reuse");
    if (n_stag == 0)   fail("no stagger wait");
    if (n_pew == 0)    fail("no PE wait for the BTU");
    if (n_btw == 0)    fail("no BTU wait for a PE");
    if (n_drop == 0)   fail("no filter drop");
    if (n_paths == 0)  fail("no backtracking");
    if (n_bp == 0)     fail("no input back-pressure");
    if (n_drop + n_paths != NREAD * NS) fail("segments lost");
    // read rate: never faster than six segments per 6*M cycles
    checks++;
    if (seg0_t[NREAD-1] - seg0_t[1] < (NREAD - 2) * NS * BT_M) fail("reads issued faster than 6*M cycles");
    $display("[%0d segments per read] read rate: %0d cycles per %0d-base read (reads 1..%0d), floor %0d",
             NS, (seg0_t[NREAD-1] - seg0_t[1]) / (NREAD - 2), LEN, NREAD - 1, NS * BT_M);
    $display("[%0d segments per read] segments %0d: backtracked %0d (%0d steps), dropped %0d, on reused PEs %0d",
             NS, n_rep, n_paths, n_steps, n_drop, n_reuse);
    $display("[%0d segments per read] cycles: stagger wait %0d, PE wait for BTU %0d, BTU wait for PE %0d, input back-pressure %0d",
             NS, n_stag, n_pew, n_btw, n_bp);
    finished = 1;
  end

endmodule
