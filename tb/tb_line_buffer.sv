// tb_line_buffer: self-checking test of the two-line buffer.
//
// Scans several rows of a small line width the way the filter chain does:
// each clock the address of the next column is read, and at each column the
// registered outputs must hold the pixels of the previous row (row1) and the
// row before it (row2) at that column, while the new pixel is written. Some
// clocks are idle (no write, the same column read again) to check that
// nothing shifts then and the data stay available.
module tb_line_buffer;
  localparam int W  = 37;
  localparam int AW = $clog2(W);

  logic          clk = 0;
  logic          en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [7:0]    din, row1, row2;
  int            checks = 0, failures = 0;

  line_buffer #(.MAX_WIDTH(W), .DATA_W(8)) dut (
    .clk(clk), .en(en), .wr_addr(wr_addr), .din(din), .rd_addr(rd_addr),
    .row1(row1), .row2(row2));

  always #5 clk = ~clk;

  function automatic logic [7:0] pat(int r, int c);
    return 8'((r * 53 + c * 7 + (r ^ c)) & 8'hFF);
  endfunction

  task automatic check_col(int r, int c);
    if (r >= 2) begin
      checks++;
      if (row1 !== pat(r-1, c) || row2 !== pat(r-2, c)) begin
        failures++;
        $display("FAIL r=%0d c=%0d row1=%0h row2=%0h exp %0h %0h", r, c, row1, row2, pat(r-1, c), pat(r-2, c));
      end
    end else if (r == 1) begin
      checks++;
      if (row1 !== pat(0, c)) begin
        failures++;
        $display("FAIL r=1 c=%0d row1=%0h exp %0h", c, row1, pat(0, c));
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; wr_addr = '0; din = '0; rd_addr = '0;
    @(negedge clk);
    for (int r = 0; r < 6; r++) begin
      for (int c = 0; c < W; c++) begin
        // an idle clock now and then: read the same column again
        if ((r * W + c) % 5 == 3) begin
          en = 0; din = 8'hEE; rd_addr = AW'(c);
          @(negedge clk);
          check_col(r, c);
        end
        en = 1; wr_addr = AW'(c); din = pat(r, c);
        rd_addr = AW'((c == W - 1) ? 0 : c + 1);
        #1;
        check_col(r, c);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
