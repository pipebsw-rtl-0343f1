// tb_dir_buffer: writes random 50-bit L-region rows in random order,
// rewrites some, and reads every entry back through the asynchronous read
// port, comparing with a copy kept here.
module tb_dir_buffer;
  localparam int ENTRIES = 24;
  localparam int ROW_W   = 50;

  logic clk = 0, wr_en = 0;
  logic [4:0] wr_addr = 0, rd_addr = 0;
  logic [ROW_W-1:0] wr_data = 0, rd_data;
  logic [ROW_W-1:0] model [ENTRIES];
  int checks = 0, failures = 0;

  dir_buffer #(.ENTRIES(ENTRIES), .ROW_W(ROW_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 20; round++) begin
      int n;
      n = (round == 0) ? ENTRIES : 10;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        wr_en   = 1;
        wr_addr = (round == 0) ? 5'(ENTRIES - 1 - k) : 5'($urandom_range(0, ENTRIES - 1));
        wr_data = {$urandom, $urandom};
        model[wr_addr] = wr_data;
      end
      @(negedge clk);
      wr_en = 0;
      for (int e = 0; e < ENTRIES; e++) begin
        rd_addr = 5'(e);
        #1;
        checks++;
        if (rd_data !== model[e]) begin
          failures++;
          $display("entry %0d read %h expected %h", e, rd_data, model[e]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
