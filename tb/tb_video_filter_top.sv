// tb_video_filter_top: end-to-end test of the video filter core.
//
// The core is built for at most 40 x 24 pixels here to keep the run short.
// The testbench plays the processor (AXI4-Lite writes and reads) and the
// video source and sink (AXI4-Stream, 16-bit 4:2:2 YUV with random chroma).
// It sends a sequence of frames covering every filter mode, with random
// input gaps and output back-pressure, stray beats before a start of frame,
// a frame with wrong tlast markers, a register write in the middle of a
// frame (which must only affect the next frame), a frame size above the
// built maximum (clamped), a frame held back by the enable bit, and two
// frames back to back at full rate. Every output beat is compared with the
// reference model: {0x80, filtered luma}, tuser on the first pixel and
// tlast at each line end. At the end the FRAMES and EOLERR registers and
// the irq_frame pulses are checked, the full-rate frame period must be
// (W+1) x (H+1) clocks, and each mechanism must have occurred at least once.
module tb_video_filter_top;
  import video_filter_pkg::*;
  import tb_video_ref_pkg::*;

  localparam int MAXW = 40, MAXH = 24;

  logic        clk = 0, rst_n = 0;
  logic [5:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic [15:0] s_tdata, m_tdata;
  logic        s_tvalid, s_tready, s_tuser, s_tlast;
  logic        m_tvalid, m_tready, m_tuser, m_tlast, irq;
  int          checks = 0, failures = 0;

  video_filter_top #(.MAX_WIDTH(MAXW), .MAX_HEIGHT(MAXH)) dut (
    .aclk(clk), .aresetn(rst_n),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready),
    .s_axis_tuser(s_tuser), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
    .m_axis_tuser(m_tuser), .m_axis_tlast(m_tlast), .irq_frame(irq));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- processor side ----------------
  task automatic wr(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = 4'hF; wvalid = 1;
    fork
      begin #1; while (!awready) begin @(negedge clk); #1; end @(posedge clk); #1 awvalid = 0; end
      begin #1; while (!wready)  begin @(negedge clk); #1; end @(posedge clk); #1 wvalid = 0; end
    join
    bready = 1;
    #1; while (!bvalid) begin @(negedge clk); #1; end
    @(posedge clk); #1 bready = 0;
  endtask

  task automatic rd(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    #1; while (!arready) begin @(negedge clk); #1; end
    @(posedge clk); #1 arvalid = 0;
    rready = 1;
    #1; while (!rvalid) begin @(negedge clk); #1; end
    d = rdata;
    @(posedge clk); #1 rready = 0;
  endtask

  // ---------------- expected frames ----------------
  typedef struct {int w, h, mode, thresh, maxval, bits, seed;} frame_t;
  frame_t exp_frames [$];
  frame_t cur;
  int ox = 0, oy = 0, frames_out = 0, irq_count = 0;
  bit in_frame = 0;
  int in_gap_pct = 20, out_stall_pct = 20;
  int sof_times [$];
  int ncyc = 0;

  // mechanism counters
  int n_in_stall = 0, n_out_stall = 0, n_dropped = 0, n_mode [5] = '{0, 0, 0, 0, 0};
  int n_midframe_write = 0, n_clamped = 0, n_enable_hold = 0, n_backtoback = 0;

  always @(posedge clk) begin
    ncyc++;
    m_tready <= ($urandom_range(0, 99) >= out_stall_pct);
    if (rst_n) begin
      if (irq) irq_count++;
      if (s_tvalid && !s_tready) n_in_stall++;
      if (m_tvalid && !m_tready) n_out_stall++;
      if (m_tvalid && m_tready) begin
        int e;
        if (m_tuser) begin
          checks++;
          if (ox != 0 || oy != 0 || exp_frames.size() == 0) begin
            failures++;
            $display("FAIL tuser at (%0d,%0d), %0d frames expected", ox, oy, exp_frames.size());
          end
          if (exp_frames.size() != 0) cur = exp_frames.pop_front();
          in_frame = 1;
          sof_times.push_back(ncyc);
        end
        if (in_frame) begin
          e = expected(cur.mode, ox, oy, cur.w, cur.h, cur.seed, cur.thresh, cur.maxval, cur.bits);
          checks++;
          if (m_tdata != {CHROMA_NEUTRAL, pix_t'(e)} || m_tlast != (ox == cur.w - 1) ||
              m_tuser != (ox == 0 && oy == 0)) begin
            failures++;
            if (failures < 20)
              $display("FAIL frame %0d (%0dx%0d mode %0d) at (%0d,%0d): %h u%0b l%0b, expected %h",
                       frames_out, cur.w, cur.h, cur.mode, ox, oy, m_tdata, m_tuser, m_tlast, e);
          end
          if (ox == cur.w - 1) begin
            ox = 0;
            if (oy == cur.h - 1) begin oy = 0; frames_out++; in_frame = 0; end
            else oy++;
          end else ox++;
        end else begin
          checks++;
          failures++;
          $display("FAIL beat outside a frame");
        end
      end
    end
  end

  // ---------------- video source ----------------
  task automatic beat(input logic [15:0] d, input logic u, input logic l);
    @(negedge clk);
    while ($urandom_range(0, 99) < in_gap_pct) @(negedge clk);
    s_tdata = d; s_tuser = u; s_tlast = l; s_tvalid = 1;
    #1;
    while (!s_tready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 s_tvalid = 0;
  endtask

  task automatic set_frame(input int w, input int h, input int mode, input int thresh,
                           input int maxval, input int bits);
    wr(REG_WIDTH, 32'(w));
    wr(REG_HEIGHT, 32'(h));
    wr(REG_MODE, 32'(mode));
    wr(REG_THRESH, 32'(thresh));
    wr(REG_MAXVAL, 32'(maxval));
    wr(REG_POSTBITS, 32'(bits));
  endtask

  // Sends a w x h frame; the expected frame uses the given (built) size.
  task automatic send_frame(input int w, input int h, input frame_t f, input bit bad_eol);
    exp_frames.push_back(f);
    n_mode[f.mode]++;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        logic l;
        l = (x == w - 1);
        if (bad_eol && y == 2 && x == 1) l = 1;
        beat({8'($urandom), 8'(img(x, y, f.seed))}, x == 0 && y == 0, l);
      end
  endtask

  function automatic frame_t mk(int w, int h, int mode, int thresh, int maxval, int bits, int seed);
    frame_t f;
    f.w = w; f.h = h; f.mode = mode; f.thresh = thresh; f.maxval = maxval; f.bits = bits; f.seed = seed;
    return f;
  endfunction

  initial begin
    logic [31:0] d;
    frame_t f;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    s_tvalid = 0; s_tdata = 0; s_tuser = 0; s_tlast = 0; m_tready = 0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;

    // 1: Sobel, with stray beats before the start of frame
    set_frame(12, 8, 1, 0, 255, 8);
    wr(REG_CTRL, 1);
    beat(16'h8011, 0, 0); beat(16'h8022, 0, 1); n_dropped += 2;
    send_frame(12, 8, mk(12, 8, 1, 0, 255, 8, 1), 0);
    // 2: threshold, bad tlast in line 2
    set_frame(9, 6, 2, 100, 200, 8);
    send_frame(9, 6, mk(9, 6, 2, 100, 200, 8, 2), 1);
    // 3: posterize; mode register rewritten mid-frame, takes effect next frame
    set_frame(16, 5, 3, 0, 0, 3);
    fork
      send_frame(16, 5, mk(16, 5, 3, 0, 0, 3, 3), 0);
      begin
        repeat (30) @(posedge clk);
        wr(REG_MODE, 4);
        wr(REG_THRESH, 90);
        wr(REG_MAXVAL, 255);
        n_midframe_write++;
      end
    join
    // 4: binary edge map with the settings written during frame 3
    send_frame(16, 5, mk(16, 5, 4, 90, 255, 3, 4), 0);
    // 5: bypass, width above the built maximum is clamped to 40
    set_frame(100, 3, 0, 0, 0, 8);
    n_clamped++;
    send_frame(MAXW, 3, mk(MAXW, 3, 0, 0, 0, 8, 5), 0);
    // 6: enable low: the frame waits
    set_frame(7, 7, 1, 0, 0, 8);
    wr(REG_CTRL, 0);
    fork
      send_frame(7, 7, mk(7, 7, 1, 0, 0, 8, 6), 0);
      begin
        repeat (50) @(posedge clk);
        if (s_tvalid && !s_tready) n_enable_hold++;
        wr(REG_CTRL, 1);
      end
    join
    // 7, 8: full size of the build, back to back at full rate
    in_gap_pct = 0;
    set_frame(MAXW, MAXH, 1, 0, 0, 8);
    wait (exp_frames.size() == 0 && !in_frame);
    out_stall_pct = 0;
    send_frame(MAXW, MAXH, mk(MAXW, MAXH, 1, 0, 0, 8, 7), 0);
    send_frame(MAXW, MAXH, mk(MAXW, MAXH, 1, 0, 0, 8, 8), 0);
    repeat (2 * MAXW + 20) @(posedge clk);

    checks++;
    if (frames_out != 8 || exp_frames.size() != 0) begin
      failures++;
      $display("FAIL %0d frames out, %0d still expected", frames_out, exp_frames.size());
    end
    checks++;
    if (sof_times.size() >= 2 &&
        sof_times[sof_times.size()-1] - sof_times[sof_times.size()-2] == (MAXW + 1) * (MAXH + 1))
      n_backtoback++;
    else begin
      failures++;
      $display("FAIL full-rate frame period %0d, expected %0d",
               sof_times[sof_times.size()-1] - sof_times[sof_times.size()-2], (MAXW + 1) * (MAXH + 1));
    end
    rd(REG_FRAMES, d);
    checks++;
    if (d != 8 || irq_count != 8) begin
      failures++;
      $display("FAIL FRAMES register %0d, irq pulses %0d, expected 8", d, irq_count);
    end
    rd(REG_EOLERR, d);
    checks++;
    if (d != 1) begin   // one early tlast in frame 2
      failures++;
      $display("FAIL EOLERR register %0d, expected 1", d);
    end

    $display("mechanisms: input stalls %0d, output stalls %0d, dropped beats %0d, modes %0d/%0d/%0d/%0d/%0d,",
             n_in_stall, n_out_stall, n_dropped, n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4]);
    $display("            mid-frame writes %0d, clamped sizes %0d, enable holds %0d, full-rate frame pairs %0d",
             n_midframe_write, n_clamped, n_enable_hold, n_backtoback);
    foreach (n_mode[i]) begin
      checks++;
      if (n_mode[i] == 0) begin failures++; $display("FAIL mode %0d never used", i); end
    end
    checks++;
    if (n_in_stall == 0 || n_out_stall == 0 || n_dropped == 0 || n_midframe_write == 0 ||
        n_clamped == 0 || n_enable_hold == 0 || n_backtoback == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
