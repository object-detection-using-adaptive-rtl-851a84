// tb_sobel_op: self-checking test of the Sobel-Feldman magnitude unit.
//
// Drives hand-picked windows (flat, vertical and horizontal edges, a
// saturating corner) and random windows, and compares mag with |Gx| + |Gy|
// computed here in integer arithmetic, saturated to 255.
module tb_sobel_op;
  import video_filter_pkg::*;

  pix_t win [9];
  pix_t mag;
  int   checks = 0, failures = 0;

  sobel_op dut (.win(win), .mag(mag));

  function automatic int ref_mag(input pix_t w [9]);
    int gx, gy, s;
    gx = (int'(w[2]) + 2*int'(w[5]) + int'(w[8])) - (int'(w[0]) + 2*int'(w[3]) + int'(w[6]));
    gy = (int'(w[6]) + 2*int'(w[7]) + int'(w[8])) - (int'(w[0]) + 2*int'(w[1]) + int'(w[2]));
    s  = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return s > 255 ? 255 : s;
  endfunction

  task automatic check(input int expect_v);
    #1;
    checks++;
    if (int'(mag) != expect_v) begin
      failures++;
      $display("FAIL window %p: mag=%0d expected %0d", win, mag, expect_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // flat: no gradient
    foreach (win[i]) win[i] = 8'd77;
    check(0);
    // vertical edge, left 10 right 30: Gx = 4*20 = 80
    win = '{8'd10, 8'd20, 8'd30, 8'd10, 8'd20, 8'd30, 8'd10, 8'd20, 8'd30};
    check(80);
    // horizontal edge going down: Gy = 4*5 = 20, Gx = 0
    win = '{8'd0, 8'd0, 8'd0, 8'd5, 8'd5, 8'd5, 8'd5, 8'd5, 8'd5};
    check(20);
    // edge going up (negative Gy)
    win = '{8'd50, 8'd50, 8'd50, 8'd50, 8'd50, 8'd50, 8'd0, 8'd0, 8'd0};
    check(200);
    // saturating corner
    win = '{8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd255, 8'd0, 8'd255, 8'd255};
    check(255);
    // small diagonal, mixed signs
    win = '{8'd3, 8'd1, 8'd0, 8'd2, 8'd9, 8'd0, 8'd1, 8'd0, 8'd4};
    check(ref_mag(win));
    for (int n = 0; n < 2000; n++) begin
      foreach (win[i]) win[i] = pix_t'($urandom_range(0, 255));
      if (n % 3 == 0) foreach (win[i]) win[i] = pix_t'(win[i] >> 3);  // small gradients
      check(ref_mag(win));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
