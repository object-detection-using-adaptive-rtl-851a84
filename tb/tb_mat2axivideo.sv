// tb_mat2axivideo: self-checking test of the grey-to-AXI4-Stream converter.
//
// Sends grey frames of several sizes with random gaps and random tready on
// the video side. Every output beat is checked for {0x80, pixel}, tuser on
// the first pixel of a frame, tlast at the end of each line, and frame_done
// once per frame after its last beat. A run at full rate checks that one
// beat leaves per clock.
module tb_mat2axivideo;
  import video_filter_pkg::*;

  logic        clk = 0, rst_n = 0;
  pix_t        s_pix;
  logic        s_sof, s_valid, s_ready;
  dim_t        in_w, in_h;
  logic [15:0] tdata;
  logic        tvalid, tready, tuser, tlast, frame_done;
  int          checks = 0, failures = 0;

  mat2axivideo #(.MAX_WIDTH(32), .MAX_HEIGHT(16)) dut (
    .clk(clk), .rst_n(rst_n), .s_pix(s_pix), .s_sof(s_sof), .s_valid(s_valid), .s_ready(s_ready),
    .in_w(in_w), .in_h(in_h), .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready),
    .m_axis_tuser(tuser), .m_axis_tlast(tlast), .frame_done(frame_done));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [17:0] exp_q [$];   // {tuser, tlast, tdata}
  int   done_pulses = 0, beats_done = 0, frames_sent = 0;
  bit   full_rate = 0;
  int   fr_first = 0, fr_last = 0, ncyc = 0;

  always @(posedge clk) begin
    ncyc++;
    tready <= full_rate ? 1'b1 : ($urandom_range(0, 99) >= 30);
    if (rst_n && frame_done) done_pulses++;
    if (rst_n && tvalid && tready) begin
      logic [17:0] e;
      checks++;
      e = exp_q.pop_front();
      if ({tuser, tlast, tdata} != e) begin
        failures++;
        $display("FAIL beat u%0b l%0b %h, expected u%0b l%0b %h", tuser, tlast, tdata, e[17], e[16], e[15:0]);
      end
      beats_done++;
      if (full_rate) begin
        if (fr_first == 0) fr_first = ncyc;
        fr_last = ncyc;
      end
    end
  end

  task automatic px(input pix_t p, input logic sof, input int gap_pct);
    @(negedge clk);
    while ($urandom_range(0, 99) < gap_pct) @(negedge clk);
    s_pix = p; s_sof = sof; s_valid = 1;
    #1;
    while (!s_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 s_valid = 0;
  endtask

  task automatic frame(input int w, input int h, input int gap_pct);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        pix_t p;
        p = pix_t'($urandom);
        if (x == 0 && y == 0) begin in_w = dim_t'(w); in_h = dim_t'(h); end
        exp_q.push_back({x == 0 && y == 0, x == w - 1, CHROMA_NEUTRAL, p});
        px(p, x == 0 && y == 0, gap_pct);
        if (x == 0 && y == 0) begin in_w = 2; in_h = 2; end
      end
    frames_sent++;
  endtask

  initial begin
    s_valid = 0; s_pix = 0; s_sof = 0; in_w = 1; in_h = 1; tready = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    frame(6, 3, 30);
    frame(1, 4, 30);
    frame(32, 2, 10);
    frame(3, 1, 50);
    repeat (20) @(posedge clk);
    full_rate = 1;
    repeat (2) @(posedge clk);
    frame(10, 5, 0);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d beats missing", exp_q.size()); end
    checks++;
    if (done_pulses != frames_sent) begin
      failures++; $display("FAIL %0d frame_done pulses for %0d frames", done_pulses, frames_sent);
    end
    checks++;
    if (fr_last - fr_first != 49) begin
      failures++; $display("FAIL 50 beats took %0d cycles", fr_last - fr_first + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
