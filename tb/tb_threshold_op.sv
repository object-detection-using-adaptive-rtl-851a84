// tb_threshold_op: self-checking test of the binary threshold unit.
//
// Sweeps every pixel value against threshold values at the extremes and in
// between, with several output values, and checks out = pix > thresh ?
// maxval : 0.
module tb_threshold_op;
  import video_filter_pkg::*;

  pix_t pix, thresh, maxval, out;
  int   checks = 0, failures = 0;

  threshold_op dut (.pix(pix), .thresh(thresh), .maxval(maxval), .out(out));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tv [5] = '{0, 1, 128, 254, 255};
    int mv [3] = '{255, 1, 170};
    foreach (tv[t]) foreach (mv[m]) begin
      for (int p = 0; p < 256; p++) begin
        pix = pix_t'(p); thresh = pix_t'(tv[t]); maxval = pix_t'(mv[m]);
        #1;
        checks++;
        if (out != ((p > tv[t]) ? pix_t'(mv[m]) : 8'd0)) begin
          failures++;
          $display("FAIL pix=%0d thresh=%0d maxval=%0d out=%0d", p, tv[t], mv[m], out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
