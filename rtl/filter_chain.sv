// filter_chain: streaming 3x3 filter chain (Sobel-Feldman, threshold,
// posterize) on a grey raster stream.
//
// The chain scans each frame over (H+1) x (W+1) positions. At a real
// position (x < W, y < H) it takes one input pixel; the extra column x = W
// and extra row y = H take none and feed zeros, which lets the window reach
// the last column and row without waiting for the next frame. At each
// position the column {two rows up, one row up, new pixel} from the line
// buffers is shifted into a 3x3 window whose centre is pixel (x-1, y-1). For
// x >= 1 and y >= 1 one output pixel, the one at the window centre, is
// produced, so the output is the same W x H raster as the input, delayed by
// one line and one pixel. The line buffers have a registered read: each
// clock the chain reads the column of the position it will visit next (or,
// while it stalls, of the current one again), so their data are ready when
// that position is processed.
//
// All three filters run on every window at once. The output is chosen per
// frame by cfg.mode: bypass (window centre), Sobel magnitude, threshold or
// posterize of the centre, or threshold of the Sobel magnitude (binary edge
// map). The Sobel result of the outer rows and columns, where the window
// would leave the image, is 0. Frame size (in_w/in_h) and cfg are latched
// with the start-of-frame pixel.
//
// Timing: one position per clock when the input has data and the output is
// free, so a frame takes W*H + W + H + 1 cycles at full rate. The output is a
// register (m_valid/m_pix/m_sof); a new frame is only started when that
// register is free or being emptied, so out_w/out_h stay those of the frame
// being output until its first pixel has been taken. Input pixels that are
// not part of a frame (no start-of-frame pixel seen) are dropped. The
// concurrent filters follow the core's design; the scan with an extra row
// and column, the zero border and the mode set are this design's choices.
module filter_chain
  import video_filter_pkg::*;
#(
  parameter int unsigned MAX_WIDTH  = 1920,
  parameter int unsigned MAX_HEIGHT = 1080
) (
  input  logic        clk,
  input  logic        rst_n,
  input  filter_cfg_t cfg,
  // grey input stream
  input  pix_t        s_pix,
  input  logic        s_sof,
  input  logic        s_valid,
  output logic        s_ready,
  input  dim_t        in_w,
  input  dim_t        in_h,
  // filtered output stream
  output pix_t        m_pix,
  output logic        m_sof,
  output logic        m_valid,
  input  logic        m_ready,
  output dim_t        out_w,
  output dim_t        out_h
);

  localparam int unsigned AW = $clog2(MAX_WIDTH);

  logic        active;
  dim_t        w_q, h_q, x, y, cur_w, cur_h, x_nx, y_nx, rd_x;
  filter_cfg_t cfg_q;
  pix_t        win [9];       // window registers, row-major
  pix_t        win_n [9];     // window after this position's shift
  pix_t        col [3];       // column entering the window, top to bottom
  pix_t        p, lb_row1, lb_row2;
  logic        real_pos, in_col, emit, out_free, tick, start, last_pos;
  logic        border;
  dim_t        cx, cy;
  pix_t        sobel_mag, thr_pix, thr_sob, post_pix, result;
  mode_e       mode_now;

  always_comb begin
    cur_w    = active ? w_q : in_w;
    cur_h    = active ? h_q : in_h;
    real_pos = (x < cur_w) && (y < cur_h);
    in_col   = (x < cur_w);
    emit     = active && (x != '0) && (y != '0);
    out_free = !m_valid || m_ready;
    start    = !active && s_valid && s_sof && out_free;
    if (active) tick = (!real_pos || s_valid) && (!emit || out_free);
    else        tick = start;
    // take the input at real positions; outside a frame drop non-sof pixels
    s_ready  = active ? (tick && real_pos) : (start || (s_valid && !s_sof));
    last_pos = (x == cur_w) && (y == cur_h);
    p        = real_pos ? s_pix : '0;
    // next scan position
    if (last_pos)           begin x_nx = '0; y_nx = '0; end
    else if (x == cur_w)    begin x_nx = '0; y_nx = y + dim_t'(1); end
    else                    begin x_nx = x + dim_t'(1); y_nx = y; end
    // line-buffer read address: the column the chain will be at next clock
    rd_x = tick ? x_nx : x;
    if (rd_x >= cur_w) rd_x = '0;
  end

  line_buffer #(.MAX_WIDTH(MAX_WIDTH), .DATA_W(PIX_W)) u_lb (
    .clk  (clk),
    .en      (tick && in_col),
    .wr_addr (x[AW-1:0]),
    .din     (p),
    .rd_addr (rd_x[AW-1:0]),
    .row1    (lb_row1),
    .row2    (lb_row2)
  );

  always_comb begin
    if (in_col) begin
      col[0] = lb_row2;
      col[1] = lb_row1;
      col[2] = p;
    end else begin
      col[0] = '0;
      col[1] = '0;
      col[2] = '0;
    end
    for (int r = 0; r < 3; r++) begin
      win_n[3*r]   = win[3*r+1];
      win_n[3*r+1] = win[3*r+2];
      win_n[3*r+2] = col[r];
    end
  end

  // The three filters, all on the same window.
  sobel_op     u_sobel (.win(win_n), .mag(sobel_mag));
  threshold_op u_thr   (.pix(win_n[4]), .thresh(cfg_q.thresh), .maxval(cfg_q.maxval), .out(thr_pix));
  threshold_op u_thr_s (.pix(sobel_mag), .thresh(cfg_q.thresh), .maxval(cfg_q.maxval), .out(thr_sob));
  posterize_op u_post  (.pix(win_n[4]), .bits(cfg_q.post_bits), .out(post_pix));

  always_comb begin
    cx       = x - dim_t'(1);
    cy       = y - dim_t'(1);
    border   = (cx == '0) || (cy == '0) || (cx == w_q - dim_t'(1)) || (cy == h_q - dim_t'(1));
    mode_now = cfg_q.mode;
    unique case (mode_now)
      MODE_SOBEL:        result = border ? '0 : sobel_mag;
      MODE_THRESHOLD:    result = thr_pix;
      MODE_POSTERIZE:    result = post_pix;
      MODE_SOBEL_THRESH: result = border ? '0 : thr_sob;
      default:           result = win_n[4];
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active  <= 1'b0;
      x       <= '0;
      y       <= '0;
      w_q     <= dim_t'(1);
      h_q     <= dim_t'(1);
      cfg_q   <= '{mode: MODE_BYPASS, thresh: '0, maxval: '0, post_bits: 4'd8};
      m_valid <= 1'b0;
      m_pix   <= '0;
      m_sof   <= 1'b0;
      for (int i = 0; i < 9; i++) win[i] <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (tick) begin
        for (int i = 0; i < 9; i++) win[i] <= win_n[i];
        if (start) begin
          active <= 1'b1;
          w_q    <= in_w;
          h_q    <= in_h;
          cfg_q  <= cfg;
        end
        if (emit) begin
          m_valid <= 1'b1;
          m_pix   <= result;
          m_sof   <= (cx == '0) && (cy == '0);
        end
        if (last_pos) active <= 1'b0;
        x <= x_nx;
        y <= y_nx;
      end
    end
  end

  assign out_w = w_q;
  assign out_h = h_q;

  // The output register holds its pixel until it is taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (m_valid && !m_ready) |=> m_valid && $stable(m_pix) && $stable(m_sof));
  // A frame never exceeds the sizes the buffers are built for.
  a_size: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (in_w <= dim_t'(MAX_WIDTH)) && (in_h <= dim_t'(MAX_HEIGHT)) && (in_w != '0) && (in_h != '0));

endmodule
