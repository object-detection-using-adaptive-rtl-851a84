// threshold_op: binary threshold of one pixel.
//
// out = maxval when pix is strictly above thresh, 0 otherwise (the binary
// threshold of the OpenCV image library; the exact rule is this design's
// choice). Purely combinational.
module threshold_op
  import video_filter_pkg::*;
(
  input  pix_t pix,
  input  pix_t thresh,
  input  pix_t maxval,
  output pix_t out
);

  always_comb out = (pix > thresh) ? maxval : '0;

endmodule
