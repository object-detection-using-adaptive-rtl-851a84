// axivideo2mat: AXI4-Stream video receiver, 16-bit 4:2:2 YUV in, grey out.
//
// The input carries one pixel per beat: luma in tdata[7:0], alternating Cb/Cr
// in tdata[15:8]; tuser marks the first pixel of a frame and tlast the last
// pixel of each line. The receiver waits for a start-of-frame beat (beats
// before it are consumed and dropped, which resynchronises a stream that was
// joined mid-frame), latches the frame size from the registers at that beat,
// then forwards exactly width x height luma values, flagging the first with
// m_sof. A tlast that is missing at the last column or present elsewhere
// gives a one-cycle eol_err pulse; the pixel count, not tlast, decides where
// lines and frames end. While enable is low no new frame is started and the
// input is held (tready low); a frame already begun is completed.
//
// Interface: the output is a valid/ready stream and is combinational from
// the input (no register stage, no added latency). m_w/m_h give the size of
// the frame being forwarded; during the wait for start-of-frame they show
// the registers, so a consumer that latches them with the m_sof pixel gets
// the size this receiver latched. Taking only luma, the resynchronisation
// and the enable behaviour are this design's choices; the conversion from
// an AXI4-Stream video stream to an image stream follows the core's design
// flow.
module axivideo2mat
  import video_filter_pkg::*;
#(
  parameter int unsigned MAX_WIDTH  = 1920,
  parameter int unsigned MAX_HEIGHT = 1080
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  dim_t        cfg_width,
  input  dim_t        cfg_height,
  // AXI4-Stream video in
  input  logic [15:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic        s_axis_tuser,
  input  logic        s_axis_tlast,
  // grey pixel stream out
  output pix_t        m_pix,
  output logic        m_sof,
  output logic        m_valid,
  input  logic        m_ready,
  output dim_t        m_w,
  output dim_t        m_h,
  output logic        eol_err
);

  typedef enum logic {S_WAIT_SOF, S_RUN} state_e;
  state_e state;
  dim_t   w_q, h_q, x, y;
  dim_t   cfg_w_c, cfg_h_c, cur_w, cur_h;
  logic   take;          // a beat is accepted this cycle
  logic   counted;       // the accepted beat is a pixel of the frame
  logic   last_col, last_pix;

  // Sizes are clamped to 1..MAX.
  always_comb begin
    cfg_w_c = (cfg_width  == '0) ? dim_t'(1) :
              (cfg_width  > dim_t'(MAX_WIDTH))  ? dim_t'(MAX_WIDTH)  : cfg_width;
    cfg_h_c = (cfg_height == '0) ? dim_t'(1) :
              (cfg_height > dim_t'(MAX_HEIGHT)) ? dim_t'(MAX_HEIGHT) : cfg_height;
    cur_w   = (state == S_WAIT_SOF) ? cfg_w_c : w_q;
    cur_h   = (state == S_WAIT_SOF) ? cfg_h_c : h_q;
  end

  always_comb begin
    m_pix = s_axis_tdata[7:0];
    m_sof = (state == S_WAIT_SOF);
    m_w   = cur_w;
    m_h   = cur_h;
    if (state == S_WAIT_SOF) begin
      m_valid       = s_axis_tvalid && s_axis_tuser && enable;
      s_axis_tready = enable && (!s_axis_tuser || m_ready);
    end else begin
      m_valid       = s_axis_tvalid;
      s_axis_tready = m_ready;
    end
    take     = s_axis_tvalid && s_axis_tready;
    counted  = take && ((state == S_RUN) || s_axis_tuser);
    last_col = (x == cur_w - dim_t'(1));
    last_pix = last_col && (y == cur_h - dim_t'(1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_WAIT_SOF;
      w_q     <= dim_t'(1);
      h_q     <= dim_t'(1);
      x       <= '0;
      y       <= '0;
      eol_err <= 1'b0;
    end else begin
      eol_err <= counted && (s_axis_tlast != last_col);
      if (counted) begin
        if (state == S_WAIT_SOF) begin
          w_q <= cfg_w_c;
          h_q <= cfg_h_c;
        end
        if (last_pix) begin
          state <= S_WAIT_SOF;
          x     <= '0;
          y     <= '0;
        end else begin
          state <= S_RUN;
          if (last_col) begin
            x <= '0;
            y <= y + dim_t'(1);
          end else begin
            x <= x + dim_t'(1);
          end
        end
      end
    end
  end

  // AXI4-Stream: a beat offered must stay until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (s_axis_tvalid && !s_axis_tready) |=> s_axis_tvalid && $stable(s_axis_tdata));

endmodule
