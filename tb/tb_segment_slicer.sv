// tb_segment_slicer: streams several reads (156 reference and read bases
// each) into the slicer with random gaps in the input, takes segments with
// random delays, and checks that each read gives six 36-base segments
// starting at bases 0, 24, ..., 120 with the right numbers, and that the
// next read is loaded while the current one is still being handed out.
module tb_segment_slicer;
  import pipebsw_pkg::*;

  localparam int NREAD = 5;

  logic clk = 0, rst_n = 0;
  logic ref_empty = 1, read_empty = 1, pop, seg_valid, seg_take = 0;
  base_t ref_base = 0, read_base = 0;
  logic [2:0] seg_idx;
  logic [7:0] read_id;
  base_t seg_ref [PE_LEN];
  base_t seg_read [PE_LEN];

  base_t rseq [NREAD][SEQ_LEN];
  base_t qseq [NREAD][SEQ_LEN];
  int checks = 0, failures = 0, overlap_seen = 0;
  int fed = 0;   // bases consumed so far over all reads

  segment_slicer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input side: behaves like two FIFOs that sometimes run dry
  always @(negedge clk) begin
    if (rst_n && fed < NREAD * SEQ_LEN) begin
      ref_empty  = ($urandom_range(0, 9) == 0);
      read_empty = ($urandom_range(0, 9) == 0);
      ref_base   = rseq[fed / SEQ_LEN][fed % SEQ_LEN];
      read_base  = qseq[fed / SEQ_LEN][fed % SEQ_LEN];
    end else begin
      ref_empty = 1; read_empty = 1;
    end
  end
  always @(posedge clk) if (pop) fed <= fed + 1;

  initial begin
    for (int r = 0; r < NREAD; r++)
      for (int b = 0; b < SEQ_LEN; b++) begin
        rseq[r][b] = base_t'($urandom);
        qseq[r][b] = base_t'($urandom);
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NREAD; r++) begin
      for (int s = 0; s < NSEG; s++) begin
        @(negedge clk);
        while (!seg_valid) @(negedge clk);
        #1;
        checks += 3;
        if (int'(seg_idx) != s) begin failures++; $display("seg_idx %0d expected %0d", seg_idx, s); end
        if (int'(read_id) != r) begin failures++; $display("read_id %0d expected %0d", read_id, r); end
        begin
          bit bad;
          bad = 0;
          for (int b = 0; b < PE_LEN; b++)
            if (seg_ref[b] != rseq[r][SEG_STEP*s + b] || seg_read[b] != qseq[r][SEG_STEP*s + b]) bad = 1;
          if (bad) begin failures++; $display("read %0d segment %0d contents wrong", r, s); end
        end
        // is the next read being loaded while this one is handed out?
        if (fed > (r + 1) * SEQ_LEN) overlap_seen++;
        repeat ($urandom_range(0, 40)) @(negedge clk);
        seg_take = 1;
        @(negedge clk);
        seg_take = 0;
      end
    end
    checks++;
    if (overlap_seen == 0) begin failures++; $display("no overlap of loading and slicing"); end
    checks++;
    if (seg_valid) begin failures++; $display("segment offered after the last read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
