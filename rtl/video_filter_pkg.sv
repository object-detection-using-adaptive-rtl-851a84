// video_filter_pkg: types and constants shared by the video filter core.
//
// The core works on 8-bit grey pixels (the luma of a 16-bit 4:2:2 YUV
// stream). Frame sizes are carried as 11-bit counts, enough for the
// 1920 x 1080 format the core is built for. The filter mode encoding, the
// per-frame filter configuration and the AXI4-Lite register offsets below
// are this design's own choices.
package video_filter_pkg;

  localparam int unsigned PIX_W  = 8;   // bits per grey pixel
  localparam int unsigned DIM_W  = 11;  // bits of a width or height count

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [DIM_W-1:0] dim_t;

  // Which filter result is sent to the output.
  typedef enum logic [2:0] {
    MODE_BYPASS       = 3'd0,  // grey input, unfiltered
    MODE_SOBEL        = 3'd1,  // Sobel-Feldman gradient magnitude
    MODE_THRESHOLD    = 3'd2,  // binary threshold of the pixel
    MODE_POSTERIZE    = 3'd3,  // reduced number of grey levels
    MODE_SOBEL_THRESH = 3'd4   // binary edge map: threshold of the Sobel magnitude
  } mode_e;

  // Filter settings, latched by the filter chain at each frame start.
  typedef struct packed {
    mode_e      mode;
    pix_t       thresh;     // threshold: pixels above it become maxval
    pix_t       maxval;     // value written for pixels above the threshold
    logic [3:0] post_bits;  // posterize: most significant bits kept (1..8)
  } filter_cfg_t;

  // AXI4-Lite register byte offsets.
  localparam logic [5:0] REG_CTRL      = 6'h00;  // [0] enable
  localparam logic [5:0] REG_WIDTH     = 6'h04;  // frame width in pixels
  localparam logic [5:0] REG_HEIGHT    = 6'h08;  // frame height in lines
  localparam logic [5:0] REG_MODE      = 6'h0C;  // mode_e
  localparam logic [5:0] REG_THRESH    = 6'h10;
  localparam logic [5:0] REG_MAXVAL    = 6'h14;
  localparam logic [5:0] REG_POSTBITS  = 6'h18;
  localparam logic [5:0] REG_FRAMES    = 6'h1C;  // read only: frames sent
  localparam logic [5:0] REG_EOLERR    = 6'h20;  // end-of-line errors, write clears

  localparam pix_t CHROMA_NEUTRAL = 8'h80;

endpackage
