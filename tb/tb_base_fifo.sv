// tb_base_fifo: random pushes and pops against a queue model, including
// pushes while full and pops while empty, checking data order, full and
// empty.
module tb_base_fifo;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [1:0] din = 0, dout;
  logic full, empty;
  logic [1:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  base_fifo #(.WIDTH(2), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int bias;
      bias = ((t / 500) % 2 == 0) ? 70 : 30;
      @(negedge clk);
      checks += 2;
      if (full != (q.size() == DEPTH)) failures++;
      if (empty != (q.size() == 0)) failures++;
      if (full) n_full++;
      if (empty) n_empty++;
      if (!empty) begin
        checks++;
        if (dout != q[0]) begin
          failures++;
          $display("t %0d: dout %0d expected %0d", t, dout, q[0]);
        end
      end
      push = ($urandom_range(0, 99) < bias);
      pop  = ($urandom_range(0, 99) < 50);
      din  = 2'($urandom);
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_full == 0 || n_empty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update at the clock edge, from the values the FIFO saw
  always @(posedge clk) begin
    if (rst_n) begin
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && !(full)) q.push_back(din);
    end
  end
endmodule
