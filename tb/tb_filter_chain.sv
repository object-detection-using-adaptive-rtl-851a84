// tb_filter_chain: self-checking test of the streaming filter chain.
//
// Sends a series of frames of different small sizes (including one pixel
// wide and one line high) in every mode, with random gaps on the input and
// random back-pressure on the output, plus stray pixels between frames that
// must be dropped. Every output pixel and its start-of-frame flag are
// compared with the reference model, and the number of pixels per frame is
// checked. A final run at full rate checks the frame period of
// (W+1) x (H+1) clocks between successive frame starts.
module tb_filter_chain;
  import video_filter_pkg::*;
  import tb_video_ref_pkg::*;

  localparam int MAXW = 16, MAXH = 12;

  logic        clk = 0, rst_n = 0;
  filter_cfg_t cfg;
  pix_t        s_pix, m_pix;
  logic        s_sof, s_valid, s_ready, m_sof, m_valid, m_ready;
  dim_t        in_w, in_h, out_w, out_h;
  int          checks = 0, failures = 0;

  filter_chain #(.MAX_WIDTH(MAXW), .MAX_HEIGHT(MAXH)) dut (
    .clk(clk), .rst_n(rst_n), .cfg(cfg),
    .s_pix(s_pix), .s_sof(s_sof), .s_valid(s_valid), .s_ready(s_ready), .in_w(in_w), .in_h(in_h),
    .m_pix(m_pix), .m_sof(m_sof), .m_valid(m_valid), .m_ready(m_ready), .out_w(out_w), .out_h(out_h));

  always #5 clk = ~clk;

  // frame list
  localparam int NF = 12;
  int fw [NF] = '{7, 5, 16, 1, 6, 9, 4, 16, 3, 8, 10, 10};
  int fh [NF] = '{5, 4, 12, 4, 1, 7, 3, 12, 2, 6, 9, 10};
  int fm [NF] = '{1, 0, 1, 2, 3, 4, 1, 4, 3, 2, 1, 1};
  int ft [NF] = '{100, 50, 128, 90, 0, 60, 10, 200, 7, 255, 30, 80};
  int fb [NF] = '{2, 3, 1, 8, 4, 0, 5, 2, 9, 6, 3, 1};
  int in_gap_pct = 30, out_stall_pct = 30;
  int sof_cycle [$];
  logic full_rate = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  int ofr = 0, ox = 0, oy = 0, ncyc = 0;
  always @(posedge clk) begin
    ncyc++;
    m_ready <= full_rate ? 1'b1 : ($urandom_range(0, 99) >= out_stall_pct);
    if (rst_n && m_valid && m_ready) begin
      int e;
      int f;
      f = (ofr < NF) ? ofr : NF - 1;
      e = expected(fm[f], ox, oy, fw[f], fh[f], f, ft[f], 255 - f, fb[f]);
      checks++;
      if (int'(m_pix) != e || m_sof != (ox == 0 && oy == 0)) begin
        failures++;
        if (failures < 20)
          $display("FAIL frame %0d (%0dx%0d mode %0d) at (%0d,%0d): got %0d sof %0b, expected %0d",
                   f, fw[f], fh[f], fm[f], ox, oy, m_pix, m_sof, e);
      end
      if (m_sof) sof_cycle.push_back(ncyc);
      if (ox == fw[f] - 1) begin
        ox = 0;
        if (oy == fh[f] - 1) begin oy = 0; ofr++; end
        else oy++;
      end else ox++;
    end
  end

  // Drive on the falling edge; the beat is taken at the next rising edge
  // at which s_ready was high.
  task automatic send(input pix_t p, input logic sof);
    @(negedge clk);
    s_pix = p; s_sof = sof; s_valid = 1'b1;
    #1;
    while (!s_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 s_valid = 1'b0;
  endtask

  initial begin
    s_valid = 0; s_pix = 0; s_sof = 0; in_w = 1; in_h = 1; m_ready = 0;
    cfg = '{mode: MODE_BYPASS, thresh: 8'd0, maxval: 8'd0, post_bits: 4'd8};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      if (f == NF - 2) begin
        // last two frames back to back at full rate
        full_rate = 1; in_gap_pct = 0;
      end
      // stray pixels outside a frame are dropped
      if (f % 3 == 1) begin
        send(8'hAA, 1'b0);
        send(8'h55, 1'b0);
      end
      for (int y = 0; y < fh[f]; y++)
        for (int x = 0; x < fw[f]; x++) begin
          while ($urandom_range(0, 99) < in_gap_pct) @(negedge clk);
          // settings for this frame go with its first pixel; change them after
          if (x == 0 && y == 0) begin
            in_w = dim_t'(fw[f]); in_h = dim_t'(fh[f]);
            cfg = '{mode: mode_e'(fm[f]), thresh: pix_t'(ft[f]), maxval: pix_t'(255 - f), post_bits: 4'(fb[f])};
          end
          send(pix_t'(img(x, y, f)), x == 0 && y == 0);
          if (x == 0 && y == 0) begin
            // later changes must not affect the running frame
            cfg.mode = MODE_BYPASS; cfg.thresh = 8'd1; in_w = 1; in_h = 1;
          end
        end
    end
    repeat (300) @(posedge clk);
    checks++;
    if (ofr != NF) begin
      failures++;
      $display("FAIL %0d frames out, expected %0d", ofr, NF);
    end
    // frame period at full rate between the last two frames
    checks++;
    if (sof_cycle.size() != NF ||
        sof_cycle[NF-1] - sof_cycle[NF-2] != (fw[NF-2] + 1) * (fh[NF-2] + 1)) begin
      failures++;
      $display("FAIL frame period %0d, expected %0d", sof_cycle[sof_cycle.size()-1] - sof_cycle[sof_cycle.size()-2],
               (fw[NF-2] + 1) * (fh[NF-2] + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
