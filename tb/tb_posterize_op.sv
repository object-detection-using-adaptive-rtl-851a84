// tb_posterize_op: self-checking test of the posterize unit.
//
// For every pixel value and every setting 0..15 of bits, checks that the
// output keeps the top N bits (N = bits clamped to 1..8) and clears the
// rest, and that the output takes no more than 2^N distinct values.
module tb_posterize_op;
  import video_filter_pkg::*;

  pix_t       pix, out;
  logic [3:0] bits;
  int         checks = 0, failures = 0;

  posterize_op dut (.pix(pix), .bits(bits), .out(out));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 16; b++) begin
      int n, step, levels;
      bit seen [256];
      n = (b == 0) ? 1 : (b > 8 ? 8 : b);
      step = 1 << (8 - n);
      levels = 0;
      foreach (seen[i]) seen[i] = 0;
      for (int p = 0; p < 256; p++) begin
        pix = pix_t'(p); bits = 4'(b);
        #1;
        checks++;
        if (int'(out) != (p / step) * step) begin
          failures++;
          $display("FAIL pix=%0d bits=%0d out=%0d", p, b, out);
        end
        if (!seen[out]) begin seen[out] = 1; levels++; end
      end
      checks++;
      if (levels != (1 << n)) begin
        failures++;
        $display("FAIL bits=%0d gives %0d levels", b, levels);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
