// video_filter_top: real-time video filter core for 1920 x 1080 frames.
//
// The core sits in the programmable logic between the video DMA and the
// display path. Video enters as AXI4-Stream, 16-bit 4:2:2 YUV, one pixel per
// beat (tuser = start of frame, tlast = end of line). axivideo2mat turns it
// into a grey (luma) pixel stream; filter_chain runs the Sobel-Feldman edge
// filter, a binary threshold and a posterize filter concurrently on every
// pixel and passes on the result chosen by the MODE register; mat2axivideo
// turns the result back into 4:2:2 YUV AXI4-Stream video. The processor sets
// the core up through the AXI4-Lite registers of axil_regs (see that file for
// the map): frame width and height, mode and filter settings, and the enable
// bit, and reads back frame and error counters. irq_frame pulses when a
// frame has been sent.
//
// Timing: one clock for everything (the system it was designed for runs at
// 100 MHz). At full rate a W x H frame needs W*H + W + H + 1 clocks; frames
// follow each other without a gap other than that. Output pixel (x, y)
// leaves about one line after input pixel (x, y) arrives. Mode and filter
// settings are taken at each frame start, so they can change between frames.
// The chain of stream conversion, filters and back-conversion follows the
// core's design flow; the single clock domain, the register map and the
// interface details are this design's choices.
module video_filter_top
  import video_filter_pkg::*;
#(
  parameter int unsigned MAX_WIDTH  = 1920,
  parameter int unsigned MAX_HEIGHT = 1080
) (
  input  logic        aclk,
  input  logic        aresetn,
  // AXI4-Lite configuration slave
  input  logic [5:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [5:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // AXI4-Stream video in
  input  logic [15:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic        s_axis_tuser,
  input  logic        s_axis_tlast,
  // AXI4-Stream video out
  output logic [15:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tuser,
  output logic        m_axis_tlast,
  output logic        irq_frame
);

  logic        enable, eol_err, frame_done;
  dim_t        cfg_width, cfg_height;
  filter_cfg_t cfg;

  pix_t        rx_pix, fc_pix;
  logic        rx_sof, rx_valid, rx_ready;
  logic        fc_sof, fc_valid, fc_ready;
  dim_t        rx_w, rx_h, fc_w, fc_h;

  axil_regs #(.ADDR_W(6)) u_regs (
    .clk            (aclk),
    .rst_n          (aresetn),
    .s_axil_awaddr  (s_axil_awaddr),
    .s_axil_awvalid (s_axil_awvalid),
    .s_axil_awready (s_axil_awready),
    .s_axil_wdata   (s_axil_wdata),
    .s_axil_wstrb   (s_axil_wstrb),
    .s_axil_wvalid  (s_axil_wvalid),
    .s_axil_wready  (s_axil_wready),
    .s_axil_bresp   (s_axil_bresp),
    .s_axil_bvalid  (s_axil_bvalid),
    .s_axil_bready  (s_axil_bready),
    .s_axil_araddr  (s_axil_araddr),
    .s_axil_arvalid (s_axil_arvalid),
    .s_axil_arready (s_axil_arready),
    .s_axil_rdata   (s_axil_rdata),
    .s_axil_rresp   (s_axil_rresp),
    .s_axil_rvalid  (s_axil_rvalid),
    .s_axil_rready  (s_axil_rready),
    .enable         (enable),
    .cfg_width      (cfg_width),
    .cfg_height     (cfg_height),
    .cfg            (cfg),
    .frame_done     (frame_done),
    .eol_err        (eol_err)
  );

  axivideo2mat #(.MAX_WIDTH(MAX_WIDTH), .MAX_HEIGHT(MAX_HEIGHT)) u_rx (
    .clk           (aclk),
    .rst_n         (aresetn),
    .enable        (enable),
    .cfg_width     (cfg_width),
    .cfg_height    (cfg_height),
    .s_axis_tdata  (s_axis_tdata),
    .s_axis_tvalid (s_axis_tvalid),
    .s_axis_tready (s_axis_tready),
    .s_axis_tuser  (s_axis_tuser),
    .s_axis_tlast  (s_axis_tlast),
    .m_pix         (rx_pix),
    .m_sof         (rx_sof),
    .m_valid       (rx_valid),
    .m_ready       (rx_ready),
    .m_w           (rx_w),
    .m_h           (rx_h),
    .eol_err       (eol_err)
  );

  filter_chain #(.MAX_WIDTH(MAX_WIDTH), .MAX_HEIGHT(MAX_HEIGHT)) u_chain (
    .clk     (aclk),
    .rst_n   (aresetn),
    .cfg     (cfg),
    .s_pix   (rx_pix),
    .s_sof   (rx_sof),
    .s_valid (rx_valid),
    .s_ready (rx_ready),
    .in_w    (rx_w),
    .in_h    (rx_h),
    .m_pix   (fc_pix),
    .m_sof   (fc_sof),
    .m_valid (fc_valid),
    .m_ready (fc_ready),
    .out_w   (fc_w),
    .out_h   (fc_h)
  );

  mat2axivideo #(.MAX_WIDTH(MAX_WIDTH), .MAX_HEIGHT(MAX_HEIGHT)) u_tx (
    .clk           (aclk),
    .rst_n         (aresetn),
    .s_pix         (fc_pix),
    .s_sof         (fc_sof),
    .s_valid       (fc_valid),
    .s_ready       (fc_ready),
    .in_w          (fc_w),
    .in_h          (fc_h),
    .m_axis_tdata  (m_axis_tdata),
    .m_axis_tvalid (m_axis_tvalid),
    .m_axis_tready (m_axis_tready),
    .m_axis_tuser  (m_axis_tuser),
    .m_axis_tlast  (m_axis_tlast),
    .frame_done    (frame_done)
  );

  assign irq_frame = frame_done;

endmodule
