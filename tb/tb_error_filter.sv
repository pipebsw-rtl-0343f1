// tb_error_filter: applies random and boundary error counts and checks the
// sum, the gap difference and the pass decision against the threshold of 10.
module tb_error_filter;
  import pipebsw_pkg::*;

  errs_t errs;
  logic [ERR_W+1:0] total;
  logic [ERR_W-1:0] gap_diff;
  logic pass;
  int checks = 0, failures = 0;
  logic clk = 0;

  error_filter #(.THRESH(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int m, i, d, s, g;
      if (t < 1000) begin
        m = $urandom_range(0, 6); i = $urandom_range(0, 6); d = $urandom_range(0, 6);
      end else begin
        m = $urandom_range(0, 127); i = $urandom_range(0, 127); d = $urandom_range(0, 127);
      end
      errs.mis = cnt_t'(m); errs.ins = cnt_t'(i); errs.del = cnt_t'(d);
      @(negedge clk);
      s = m + i + d;
      g = (i > d) ? i - d : d - i;
      checks++;
      if (int'(total) != s || int'(gap_diff) != g || pass != (s <= 10)) begin
        failures++;
        if (failures < 10)
          $display("errs %0d/%0d/%0d: total %0d gap %0d pass %0d", m, i, d, total, gap_diff, pass);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
