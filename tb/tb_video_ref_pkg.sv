// tb_video_ref_pkg: reference model used by the filter testbenches.
//
// img() gives the test image as a function of position and a seed, so no
// frame needs to be stored: a mix of smooth ramps, hard edges and noise so
// that every filter output range is exercised. expected() computes the
// filtered pixel at (x, y) of a W x H frame for a given mode and settings,
// independently of the RTL: the Sobel-Feldman magnitude |Gx| + |Gy| of the
// 3x3 neighbourhood, saturated to 255 and 0 on the outer rows and columns;
// the binary threshold (p > thresh ? maxval : 0); posterize keeping the top
// N bits (N clamped to 1..8); or the pixel itself in bypass.
package tb_video_ref_pkg;

  function automatic int img(int x, int y, int seed);
    int h;
    h = (x * 73856093) ^ (y * 19349663) ^ (seed * 83492791);
    h = h ^ (h >>> 13);
    case ((seed + (x / 5) + (y / 3)) % 4)
      0: return (x * 9 + y * 4 + seed) & 255;             // ramp
      1: return ((x / 4 + y / 4) % 2) ? 230 : 20;         // checker edges
      2: return (h & 255);                                 // noise
      default: return (x > y) ? 200 : ((h & 31) + 40);     // diagonal edge
    endcase
  endfunction

  function automatic int sobel_ref(int x, int y, int w, int h, int seed);
    int gx, gy, s;
    if (x == 0 || y == 0 || x == w - 1 || y == h - 1) return 0;
    gx = (img(x+1, y-1, seed) + 2*img(x+1, y, seed) + img(x+1, y+1, seed))
       - (img(x-1, y-1, seed) + 2*img(x-1, y, seed) + img(x-1, y+1, seed));
    gy = (img(x-1, y+1, seed) + 2*img(x, y+1, seed) + img(x+1, y+1, seed))
       - (img(x-1, y-1, seed) + 2*img(x, y-1, seed) + img(x+1, y-1, seed));
    s = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return s > 255 ? 255 : s;
  endfunction

  function automatic int expected(int mode, int x, int y, int w, int h, int seed,
                                  int thresh, int maxval, int bits);
    int p, n;
    p = img(x, y, seed);
    n = (bits == 0) ? 1 : (bits > 8 ? 8 : bits);
    case (mode)
      1: return sobel_ref(x, y, w, h, seed);
      2: return (p > thresh) ? maxval : 0;
      3: return p & ((255 << (8 - n)) & 255);
      4: begin
           if (x == 0 || y == 0 || x == w - 1 || y == h - 1) return 0;
           return (sobel_ref(x, y, w, h, seed) > thresh) ? maxval : 0;
         end
      default: return p;
    endcase
  endfunction

endpackage
