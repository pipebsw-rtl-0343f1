// dir_buffer: direction matrix buffer of one processing element.
//
// 24 entries of 50 bits; entry e holds the 2-bit directions of the 25
// positions of "L" region e (two bits per position, position p in bits
// [2p+1:2p]). Storing only the band needs 24 x 50 = 1200 bits per segment.
// The entry count and width follow the document; the ports are this design's
// choice: one synchronous write port, used by the PE as each L region
// completes, and one asynchronous read port, so the backtracking unit can
// read an entry and act on it in the same cycle. Contents are not reset; an
// entry is always written before it is read.
module dir_buffer #(
  parameter int ENTRIES = 24,
  parameter int ROW_W   = 50
) (
  input  logic                       clk,
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_addr,
  input  logic [ROW_W-1:0]           wr_data,
  input  logic [$clog2(ENTRIES)-1:0] rd_addr,
  output logic [ROW_W-1:0]           rd_data
);

  logic [ROW_W-1:0] mem [ENTRIES];

  always_ff @(posedge clk)
    if (wr_en) mem[wr_addr] <= wr_data;

  assign rd_data = mem[rd_addr];

  // synthesis-neutral checks of the address ranges
  always_ff @(posedge clk) begin
    assert (!wr_en || int'(wr_addr) < ENTRIES)
      else $error("dir_buffer: write address %0d out of range", wr_addr);
  end

endmodule
