// sobel_op: Sobel-Feldman gradient magnitude of one 3x3 window.
//
// The window is given row-major, win[0] top-left ... win[8] bottom-right.
// The horizontal derivative uses the kernel Gx = [-1 0 1; -2 0 2; -1 0 1]
// and the vertical derivative its transpose Gy = [-1 -2 -1; 0 0 0; 1 2 1],
// the two 3x3 Sobel-Feldman kernels. The magnitude is approximated as
// |Gx| + |Gy| and saturated to 255; that approximation, common in hardware,
// is this design's choice. Purely combinational.
module sobel_op
  import video_filter_pkg::*;
(
  input  pix_t win [9],
  output pix_t mag
);

  logic signed [11:0] gx, gy;
  logic        [11:0] ax, ay;
  logic        [12:0] sum;

  always_comb begin
    gx = (12'(win[2]) + 12'({win[5], 1'b0}) + 12'(win[8]))
       - (12'(win[0]) + 12'({win[3], 1'b0}) + 12'(win[6]));
    gy = (12'(win[6]) + 12'({win[7], 1'b0}) + 12'(win[8]))
       - (12'(win[0]) + 12'({win[1], 1'b0}) + 12'(win[2]));
    ax  = gx[11] ? 12'(-gx) : 12'(gx);
    ay  = gy[11] ? 12'(-gy) : 12'(gy);
    sum = 13'(ax) + 13'(ay);
    mag = (sum > 13'd255) ? 8'd255 : sum[7:0];
  end

endmodule
