// tb_video_filter_full: full-size run of the video filter core.
//
// The core is built with its default sizes (1920 x 1080). The testbench
// enables it through AXI4-Lite, leaving the reset configuration (1920 x
// 1080, Sobel mode), and streams a 1920 x 1080 frame of 4:2:2 YUV at one
// beat per clock with the output always ready. While each frame is still in
// flight it selects the next filter, so four frames follow back to back:
// Sobel, threshold (96, value 255), posterize (3 bits) and the binary edge
// map (threshold 96 of the Sobel magnitude). Every output beat is compared
// with the reference model, and the distance between successive frames'
// first output beats must be 1921 x 1081 clocks, the core's full-rate frame
// period (about 48 frames per second at 100 MHz).
module tb_video_filter_full;
  import video_filter_pkg::*;
  import tb_video_ref_pkg::*;

  localparam int W = 1920, H = 1080, NF = 4;

  logic        clk = 0, rst_n = 0;
  logic [5:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic [15:0] s_tdata, m_tdata;
  logic        s_tvalid, s_tready, s_tuser, s_tlast;
  logic        m_tvalid, m_tready, m_tuser, m_tlast, irq;
  int          checks = 0, failures = 0;

  video_filter_top dut (
    .aclk(clk), .aresetn(rst_n),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready),
    .s_axis_tuser(s_tuser), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
    .m_axis_tuser(m_tuser), .m_axis_tlast(m_tlast), .irq_frame(irq));

  always #5 clk = ~clk;

  initial begin
    repeat ((NF + 2) * (W + 1) * (H + 1)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = 4'hF; wvalid = 1;
    fork
      begin #1; while (!awready) begin @(negedge clk); #1; end @(posedge clk); #1 awvalid = 0; end
      begin #1; while (!wready)  begin @(negedge clk); #1; end @(posedge clk); #1 wvalid = 0; end
    join
    bready = 1;
    #1; while (!bvalid) begin @(negedge clk); #1; end
    @(posedge clk); #1 bready = 0;
  endtask

  // output checking
  int mode_of [NF] = '{1, 2, 3, 4};
  int fr = 0, ox = 0, oy = 0, ncyc = 0, irq_count = 0, mism = 0;
  int sof_t [NF];
  always @(posedge clk) begin
    ncyc++;
    if (rst_n && irq) irq_count++;
    if (rst_n && m_tvalid && m_tready && fr < NF) begin
      int e;
      if (ox == 0 && oy == 0) sof_t[fr] = ncyc;
      e = expected(mode_of[fr], ox, oy, W, H, 11 + fr, 96, 255, 3);
      if (m_tdata != {CHROMA_NEUTRAL, pix_t'(e)} || m_tuser != (ox == 0 && oy == 0) ||
          m_tlast != (ox == W - 1)) begin
        mism++;
        if (mism < 10)
          $display("FAIL frame %0d at (%0d,%0d): %h u%0b l%0b, expected %h", fr, ox, oy,
                   m_tdata, m_tuser, m_tlast, e);
      end
      if (ox == W - 1) begin
        ox = 0;
        if (oy == H - 1) begin
          oy = 0;
          checks++;
          if (mism != 0) failures++;
          $display("frame %0d (mode %0d): %0d pixels, %0d mismatches", fr, mode_of[fr], W * H, mism);
          mism = 0;
          fr++;
        end else oy++;
      end else ox++;
    end
  end

  initial begin
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    s_tvalid = 0; s_tdata = 0; s_tuser = 0; s_tlast = 0; m_tready = 1;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    wr(REG_CTRL, 1);
    wr(REG_THRESH, 96);
    wr(REG_POSTBITS, 3);
    for (int f = 0; f < NF; f++) begin
      @(negedge clk);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          s_tdata = {8'(x + y), 8'(img(x, y, 11 + f))};
          s_tuser = (x == 0 && y == 0);
          s_tlast = (x == W - 1);
          s_tvalid = 1;
          #1;
          while (!s_tready) begin @(negedge clk); #1; end
          @(negedge clk);
        end
      s_tvalid = 0;
      // the next frame's filter, written while this one is still in flight
      if (f < NF - 1) wr(REG_MODE, 32'(mode_of[f+1]));
    end
    wait (fr == NF);
    repeat (10) @(posedge clk);
    checks++;
    if (irq_count != NF) begin failures++; $display("FAIL %0d frame interrupts", irq_count); end
    for (int f = 1; f < NF; f++) begin
      checks++;
      $display("frame period %0d clocks", sof_t[f] - sof_t[f-1]);
      if (sof_t[f] - sof_t[f-1] != (W + 1) * (H + 1)) begin
        failures++;
        $display("FAIL frame period, expected %0d", (W + 1) * (H + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
