// posterize_op: posterize one pixel by keeping its most significant bits.
//
// With bits = N the low 8-N bits are cleared, leaving 2^N grey levels.
// bits = 0 is treated as 1 and values above 8 as 8 (no change). Keeping the
// top bits is this design's reading of "posterize". Purely combinational.
module posterize_op
  import video_filter_pkg::*;
(
  input  pix_t       pix,
  input  logic [3:0] bits,
  output pix_t       out
);

  logic [3:0] n;
  pix_t       mask;

  always_comb begin
    if (bits == 4'd0)      n = 4'd1;
    else if (bits > 4'd8)  n = 4'd8;
    else                   n = bits;
    mask = pix_t'(8'hFF << (4'd8 - n));
    out  = pix & mask;
  end

endmodule
