// tb_processing_element: scores random segments on one processing element
// and compares every recorded direction (24 L regions x 25 positions), the
// index, score and error counts of the maximum of the last L region, and
// the latency from start to done (73 cycles) with the reference model.
// Segments are similar sequence pairs with mismatches and gaps, plus some
// unrelated random pairs.
module tb_processing_element;
  import pipebsw_pkg::*;
  import bsw_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  base_t ref_seg [PE_LEN];
  base_t read_seg [PE_LEN];
  logic busy, wr_en, done;
  logic [4:0] wr_addr, max_idx;
  logic [ROW_W-1:0] wr_data;
  score_t max_h;
  errs_t max_e;

  int checks = 0, failures = 0;
  logic [ROW_W-1:0] rows [ENTRIES];
  bit               seen [ENTRIES];

  processing_element dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (wr_en) begin
      rows[wr_addr] <= wr_data;
      seen[wr_addr] <= 1'b1;
    end

  task automatic make_pair(input int mode, output bit [1:0] rf [N], output bit [1:0] rd [N]);
    int si;
    for (int i = 0; i < N; i++) rf[i] = 2'($urandom);
    if (mode == 0) begin
      for (int i = 0; i < N; i++) rd[i] = 2'($urandom);
    end else begin
      si = 0;
      for (int j = 0; j < N; j++) begin
        int r;
        r = $urandom_range(0, 99);
        if (r < 4 && si < N - 1) si++;            // deletion in the read
        if (r >= 4 && r < 8) begin                 // insertion in the read
          rd[j] = 2'($urandom);
          continue;
        end
        rd[j] = (si < N) ? rf[si] : 2'($urandom);
        if (r >= 8 && r < 14) rd[j] = rd[j] + 2'd1; // mismatch
        si++;
      end
    end
  endtask

  initial begin
    bit [1:0] rf [N];
    bit [1:0] rd [N];
    int t0, lat, exp_idx, pi, pj;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 12; trial++) begin
      make_pair((trial % 4 == 3) ? 0 : 1, rf, rd);
      for (int i = 0; i < N; i++) begin
        ref_seg[i]  = rf[i];
        read_seg[i] = rd[i];
      end
      ref_score(rf, rd);
      for (int e = 0; e < ENTRIES; e++) seen[e] = 0;
      @(negedge clk);
      start = 1;
      @(posedge clk);
      t0 = $time;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      lat = int'(($time - t0 - 5) / 10);
      checks++;
      if (lat != 73) begin
        failures++;
        $display("latency %0d, expected 73", lat);
      end
      for (int e = 0; e < ENTRIES; e++) begin
        checks++;
        if (!seen[e]) begin
          failures++;
          $display("entry %0d never written", e);
        end
        for (int p = 0; p < LPOS; p++) begin
          checks++;
          if (int'(rows[e][2*p +: 2]) != ldir(e + 12, p)) begin
            failures++;
            if (failures < 10)
              $display("trial %0d entry %0d pos %0d: dir %0d expected %0d", trial, e, p,
                       rows[e][2*p +: 2], ldir(e + 12, p));
          end
        end
      end
      exp_idx = lmax_idx();
      pi = lpos_i(N-1, exp_idx) + 1;
      pj = lpos_j(N-1, exp_idx) + 1;
      checks += 3;
      if (int'(max_idx) != exp_idx) begin
        failures++;
        $display("trial %0d max_idx %0d expected %0d", trial, max_idx, exp_idx);
      end
      if (int'(max_h) != rh[pi][pj]) begin
        failures++;
        $display("trial %0d max_h %0d expected %0d", trial, max_h, rh[pi][pj]);
      end
      if (int'(max_e.mis) != rmis[pi][pj] || int'(max_e.ins) != rins[pi][pj] ||
          int'(max_e.del) != rdel[pi][pj]) begin
        failures++;
        $display("trial %0d errors %0d/%0d/%0d expected %0d/%0d/%0d", trial,
                 max_e.mis, max_e.ins, max_e.del, rmis[pi][pj], rins[pi][pj], rdel[pi][pj]);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
