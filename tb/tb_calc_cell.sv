// tb_calc_cell: drives one 3 x 3 cell with random boundary scores, error
// counts and bases, runs its three phases and compares all nine scores,
// directions and error counts with a serial evaluation of the recurrence
// done here. Also checks that results appear phase by phase (three cycles
// per block) and that a cell without `en` keeps its results.
module tb_calc_cell;
  import pipebsw_pkg::*;

  logic clk = 0, en = 0;
  logic [1:0] phase = 0;
  base_t ref_b [3];
  base_t read_b [3];
  hpos_t corner;
  hpos_t top [3];
  hpos_t left [3];
  hpos_t bottom [4];
  hpos_t right [3];
  dir_t  dir [3][3];

  int checks = 0, failures = 0;

  calc_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // serial reference over a 4 x 4 grid (row/column 0 = inputs)
  int H [4][4], EM [4][4], EI [4][4], ED [4][4], DR [4][4];

  function automatic hpos_t rnd_pos();
    hpos_t v;
    if ($urandom_range(0, 9) == 0) v.h = score_t'(NEG_SCORE);
    else v.h = score_t'($urandom_range(0, 40));
    v.e.mis = cnt_t'($urandom_range(0, 20));
    v.e.ins = cnt_t'($urandom_range(0, 20));
    v.e.del = cnt_t'($urandom_range(0, 20));
    return v;
  endfunction

  task automatic ref_block();
    H[0][0] = int'(corner.h);
    EM[0][0] = int'(corner.e.mis); EI[0][0] = int'(corner.e.ins); ED[0][0] = int'(corner.e.del);
    for (int c = 1; c < 4; c++) begin
      H[0][c] = int'(top[c-1].h);
      EM[0][c] = int'(top[c-1].e.mis); EI[0][c] = int'(top[c-1].e.ins); ED[0][c] = int'(top[c-1].e.del);
    end
    for (int r = 1; r < 4; r++) begin
      H[r][0] = int'(left[r-1].h);
      EM[r][0] = int'(left[r-1].e.mis); EI[r][0] = int'(left[r-1].e.ins); ED[r][0] = int'(left[r-1].e.del);
    end
    for (int r = 1; r < 4; r++)
      for (int c = 1; c < 4; c++) begin
        int dg, tp, lf, b;
        bit eq;
        eq = ref_b[r-1] == read_b[c-1];
        dg = H[r-1][c-1] + (eq ? 2 : -2);
        tp = H[r-1][c] - 1;
        lf = H[r][c-1] - 1;
        b = 0;
        if (dg > b) b = dg;
        if (tp > b) b = tp;
        if (lf > b) b = lf;
        H[r][c] = b;
        if (dg == b || (tp != b && lf != b)) begin
          DR[r][c] = (dg == b && eq) ? 0 : 1;
          EM[r][c] = EM[r-1][c-1] + ((dg == b && eq) ? 0 : 1);
          EI[r][c] = EI[r-1][c-1];
          ED[r][c] = ED[r-1][c-1];
        end else if (tp == b) begin
          DR[r][c] = 2;
          EM[r][c] = EM[r-1][c]; EI[r][c] = EI[r-1][c] + 1; ED[r][c] = ED[r-1][c];
        end else begin
          DR[r][c] = 3;
          EM[r][c] = EM[r][c-1]; EI[r][c] = EI[r][c-1]; ED[r][c] = ED[r][c-1] + 1;
        end
      end
  endtask

  // the cell's registered value of block position (r, c), r, c = 1..3
  function automatic hpos_t got(input int r, input int c);
    if (r == 3) return bottom[c];
    if (c == 3) return right[r-1];
    return dut.hq[r-1][c-1];
  endfunction

  task automatic check_pos(input int r, input int c, input int trial);
    hpos_t g;
    g = got(r, c);
    checks++;
    if (int'(g.h) != H[r][c] || int'(dir[r-1][c-1]) != DR[r][c] ||
        int'(g.e.mis) != EM[r][c] || int'(g.e.ins) != EI[r][c] || int'(g.e.del) != ED[r][c]) begin
      failures++;
      if (failures < 12)
        $display("trial %0d H%0d%0d: got h=%0d d=%0d e=%0d/%0d/%0d exp h=%0d d=%0d e=%0d/%0d/%0d",
                 trial, r, c, g.h, dir[r-1][c-1], g.e.mis, g.e.ins, g.e.del,
                 H[r][c], DR[r][c], EM[r][c], EI[r][c], ED[r][c]);
    end
  endtask

  // positions finished after each phase
  int sched_r [3][3] = '{'{1, 1, 2}, '{1, 2, 3}, '{2, 3, 3}};
  int sched_c [3][3] = '{'{1, 2, 1}, '{3, 2, 1}, '{3, 2, 3}};

  initial begin
    for (int trial = 0; trial < 3000; trial++) begin
      // similar bases most of the time so that all four sources occur
      for (int i = 0; i < 3; i++) begin
        ref_b[i]  = base_t'($urandom);
        read_b[i] = ($urandom_range(0, 1) == 0) ? ref_b[i] : base_t'($urandom);
      end
      corner = rnd_pos();
      for (int i = 0; i < 3; i++) begin
        top[i]  = rnd_pos();
        left[i] = rnd_pos();
      end
      if (trial % 7 == 0) begin   // all-zero boundary: baseline cases
        corner = HPOS_ZERO;
        for (int i = 0; i < 3; i++) begin top[i] = HPOS_ZERO; left[i] = HPOS_ZERO; end
      end
      ref_block();
      @(negedge clk);
      en = 1;
      for (int ph = 0; ph < 3; ph++) begin
        phase = 2'(ph);
        @(negedge clk);
        for (int n = 0; n < 3; n++) check_pos(sched_r[ph][n], sched_c[ph][n], trial);
      end
      en = 0;
      // H30 pass-through on the bottom output
      checks++;
      if (bottom[0] != left[2]) failures++;
      // results hold while the cell is idle, even with new inputs
      corner = rnd_pos();
      top[0] = rnd_pos();
      phase = 2'd0;
      @(negedge clk);
      check_pos(1, 1, trial);
      check_pos(3, 3, trial);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
