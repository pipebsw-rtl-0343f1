// tb_btu: runs the backtracking unit on direction matrices built by the
// reference model from random similar sequence pairs, starting at the
// maximum of the last L region, and compares every path step (direction,
// reference and read coordinates), the step count, the 24..36 cycle range
// and the one-step-per-cycle rate with the reference walk. Also builds
// matrices of pure deletions and pure insertions whose paths leave the band,
// and checks that the walk stops there with `band_exit`.
module tb_btu;
  import pipebsw_pkg::*;
  import bsw_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] start_pos = 0;
  logic [7:0] seg_base = 0;
  logic busy, step_valid, done, band_exit;
  logic [4:0] rd_addr;
  logic [ROW_W-1:0] rd_data;
  dir_t step_dir;
  logic [7:0] step_i, step_j;
  logic [5:0] steps;

  logic [ROW_W-1:0] rows [ENTRIES];
  assign rd_data = rows[rd_addr];

  int checks = 0, failures = 0;
  int n_exit = 0, n_normal = 0;

  btu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_rows();
    for (int e = 0; e < ENTRIES; e++)
      for (int p = 0; p < LPOS; p++) rows[e][2*p +: 2] = 2'(ldir(e + 12, p));
  endtask

  task automatic run_walk(input int p0, input int base, input int trial);
    int k, cyc;
    ref_backtrack(p0);
    @(negedge clk);
    start_pos = 5'(p0);
    seg_base  = 8'(base);
    start = 1;
    @(negedge clk);
    start = 0;
    k = 0;
    cyc = 0;
    forever begin
      cyc++;
      if (step_valid) begin
        checks++;
        if (k >= bt_len || int'(step_dir) != bt_dir[k] ||
            int'(step_i) != bt_i[k] + base || int'(step_j) != bt_j[k] + base) begin
          failures++;
          if (failures < 10)
            $display("trial %0d step %0d: got d=%0d (%0d,%0d) exp d=%0d (%0d,%0d)", trial, k,
                     step_dir, step_i, step_j, bt_dir[k], bt_i[k] + base, bt_j[k] + base);
        end
        k++;
      end
      if (done) break;
      @(negedge clk);
    end
    checks += 3;
    if (k != bt_len || int'(steps) != bt_len) begin
      failures++;
      $display("trial %0d: %0d steps (count %0d), expected %0d", trial, k, steps, bt_len);
    end
    if (band_exit != bt_exit) begin
      failures++;
      $display("trial %0d: band_exit %0d expected %0d", trial, band_exit, bt_exit);
    end
    // one cycle to load the pointers, then one position per cycle
    if (cyc != bt_len + 1) begin
      failures++;
      $display("trial %0d: %0d cycles for %0d steps", trial, cyc, bt_len);
    end
    if (!bt_exit) begin
      n_normal++;
      checks++;
      if (bt_len < 24 || bt_len > 36) begin
        failures++;
        $display("trial %0d: path of %0d steps outside 24..36", trial, bt_len);
      end
    end else n_exit++;
  endtask

  initial begin
    bit [1:0] rf [N];
    bit [1:0] rd [N];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 300; trial++) begin
      int si;
      for (int i = 0; i < N; i++) rf[i] = 2'($urandom);
      si = 0;
      for (int j = 0; j < N; j++) begin
        int r;
        r = $urandom_range(0, 99);
        if (r < 5 && si < N - 1) si++;
        if (r >= 5 && r < 10) begin rd[j] = 2'($urandom); continue; end
        rd[j] = (si < N) ? rf[si] : 2'($urandom);
        if (r >= 10 && r < 15) rd[j] = rd[j] + 2'd1;
        si++;
      end
      ref_score(rf, rd);
      load_rows();
      run_walk(lmax_idx(), 24 * (trial % 6), trial);
    end
    // paths that leave the band: all deletions, all insertions
    for (int t = 0; t < 2; t++) begin
      for (int i = 0; i <= N; i++)
        for (int j = 0; j <= N; j++) rdir[i][j] = (t == 0) ? 3 : 2;
      load_rows();
      run_walk(12, 0, 1000 + t);
    end
    checks++;
    if (n_exit < 2) begin
      failures++;
      $display("band exit seen %0d times", n_exit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
