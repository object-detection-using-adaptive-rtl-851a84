// mat2axivideo: grey pixel stream to AXI4-Stream video, 16-bit 4:2:2 YUV.
//
// Each grey pixel becomes one beat with the pixel as luma in tdata[7:0] and
// the neutral chroma value 0x80 in tdata[15:8], so the output is a grey
// image in the same 4:2:2 format as the input. The sideband is generated
// here from pixel counters: tuser on the first pixel of a frame and tlast
// on the last pixel of each line. The frame size is latched from in_w/in_h
// with the first pixel (s_sof), and the upstream start-of-frame flag is
// checked against the counters by an assertion. frame_done pulses for one
// cycle when the last pixel of a frame has been accepted downstream.
//
// Timing: one register stage (AXI4-Stream register slice); s_ready is
// high whenever the register is empty or being emptied, so a full-rate
// stream passes at one pixel per clock with one cycle of latency. The
// conversion direction and format follow the core's design flow; the
// neutral chroma and the register slice are this design's choices.
module mat2axivideo
  import video_filter_pkg::*;
#(
  parameter int unsigned MAX_WIDTH  = 1920,
  parameter int unsigned MAX_HEIGHT = 1080
) (
  input  logic        clk,
  input  logic        rst_n,
  // grey pixel stream in
  input  pix_t        s_pix,
  input  logic        s_sof,
  input  logic        s_valid,
  output logic        s_ready,
  input  dim_t        in_w,
  input  dim_t        in_h,
  // AXI4-Stream video out
  output logic [15:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tuser,
  output logic        m_axis_tlast,
  output logic        frame_done
);

  dim_t w_q, h_q, x, y, cur_w, cur_h;
  logic take, last_col, last_pix, out_last_pix;

  always_comb begin
    cur_w    = (x == '0 && y == '0) ? in_w : w_q;
    cur_h    = (x == '0 && y == '0) ? in_h : h_q;
    s_ready  = !m_axis_tvalid || m_axis_tready;
    take     = s_valid && s_ready;
    last_col = (x == cur_w - dim_t'(1));
    last_pix = last_col && (y == cur_h - dim_t'(1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
      m_axis_tuser  <= 1'b0;
      m_axis_tlast  <= 1'b0;
      out_last_pix  <= 1'b0;
      frame_done    <= 1'b0;
      w_q           <= dim_t'(1);
      h_q           <= dim_t'(1);
      x             <= '0;
      y             <= '0;
    end else begin
      frame_done <= m_axis_tvalid && m_axis_tready && out_last_pix;
      if (m_axis_tvalid && m_axis_tready) m_axis_tvalid <= 1'b0;
      if (take) begin
        m_axis_tvalid <= 1'b1;
        m_axis_tdata  <= {CHROMA_NEUTRAL, s_pix};
        m_axis_tuser  <= (x == '0) && (y == '0);
        m_axis_tlast  <= last_col;
        out_last_pix  <= last_pix;
        if (x == '0 && y == '0) begin
          w_q <= in_w;
          h_q <= in_h;
        end
        if (last_pix) begin
          x <= '0;
          y <= '0;
        end else if (last_col) begin
          x <= '0;
          y <= y + dim_t'(1);
        end else begin
          x <= x + dim_t'(1);
        end
      end
    end
  end

  // The upstream start-of-frame flag agrees with the pixel count.
  a_sof: assert property (@(posedge clk) disable iff (!rst_n)
    take |-> (s_sof == ((x == '0) && (y == '0))));
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (m_axis_tvalid && !m_axis_tready) |=> m_axis_tvalid && $stable(m_axis_tdata));
  a_size: assert property (@(posedge clk) disable iff (!rst_n)
    (take && s_sof) |-> (in_w <= dim_t'(MAX_WIDTH)) && (in_h <= dim_t'(MAX_HEIGHT)));

endmodule
