// line_buffer: two-line pixel store for a streaming 3x3 window, written so
// that it maps to simple dual-port block RAM.
//
// The store holds the two most recent image rows, line1 (one row up) and
// line2 (two rows up), MAX_WIDTH pixels each. Reads are synchronous: the
// row1/row2 outputs give, one clock later, the contents at rd_addr. A
// write at wr_addr (en high) shifts that column: line1 takes din and line2
// takes the old line1 pixel, which is the row1 output. The caller must
// therefore have read wr_addr in the clock before the write; the filter
// chain does this by always reading the column it will visit next, and
// re-reading the current column while it stalls. An assertion checks the
// rule. Reading and writing the same address in one clock returns the old
// contents. Contents are not reset; the filter chain never uses them before
// they are written in a frame. Keeping line buffers in block RAM follows the
// original design; the read-ahead scheme is this design's own.
module line_buffer #(
  parameter int unsigned MAX_WIDTH = 1920,
  parameter int unsigned DATA_W    = 8,
  localparam int unsigned AW       = $clog2(MAX_WIDTH)
) (
  input  logic              clk,
  input  logic              en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] din,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] row1,
  output logic [DATA_W-1:0] row2
);

  logic [DATA_W-1:0] line1 [MAX_WIDTH];
  logic [DATA_W-1:0] line2 [MAX_WIDTH];
  logic [AW-1:0]     rd_q;

  always_ff @(posedge clk) begin
    row1 <= line1[rd_addr];
    row2 <= line2[rd_addr];
    rd_q <= rd_addr;
    if (en) begin
      line1[wr_addr] <= din;
      line2[wr_addr] <= row1;
    end
  end

  // A write must follow a read of the same column.
  a_read_before_write: assert property (@(posedge clk) en |-> (wr_addr == rd_q));

endmodule
