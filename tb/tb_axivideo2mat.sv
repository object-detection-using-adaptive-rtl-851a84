// tb_axivideo2mat: self-checking test of the AXI4-Stream video receiver.
//
// Sends frames of 4:2:2 YUV beats with random gaps and random back-pressure
// on the grey side. Before some frames, beats without start-of-frame are
// sent and must be dropped; one frame carries a misplaced and a missing
// tlast, which must give exactly two eol_err pulses; while enable is low a
// waiting start-of-frame beat must not be taken. Every forwarded pixel is
// checked against the luma of its beat, with m_sof on the first pixel and
// the latched frame size, even when the size registers change mid-frame.
module tb_axivideo2mat;
  import video_filter_pkg::*;

  logic        clk = 0, rst_n = 0, enable;
  dim_t        cfg_width, cfg_height, m_w, m_h;
  logic [15:0] tdata;
  logic        tvalid, tready, tuser, tlast;
  pix_t        m_pix;
  logic        m_sof, m_valid, m_ready, eol_err;
  int          checks = 0, failures = 0;

  axivideo2mat #(.MAX_WIDTH(32), .MAX_HEIGHT(16)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .cfg_width(cfg_width), .cfg_height(cfg_height),
    .s_axis_tdata(tdata), .s_axis_tvalid(tvalid), .s_axis_tready(tready),
    .s_axis_tuser(tuser), .s_axis_tlast(tlast),
    .m_pix(m_pix), .m_sof(m_sof), .m_valid(m_valid), .m_ready(m_ready),
    .m_w(m_w), .m_h(m_h), .eol_err(eol_err));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected pixels, in order
  pix_t exp_q [$];
  logic sof_q [$];
  int   exp_w [$], exp_h [$];
  int   eol_pulses = 0;

  always @(posedge clk) begin
    m_ready <= ($urandom_range(0, 99) >= 25);
    if (rst_n && eol_err) eol_pulses++;
    if (rst_n && m_valid && m_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected pixel %0h", m_pix);
      end else begin
        pix_t e; logic es;
        e = exp_q.pop_front(); es = sof_q.pop_front();
        if (m_pix != e || m_sof != es) begin
          failures++;
          $display("FAIL pixel %0h sof %0b, expected %0h sof %0b", m_pix, m_sof, e, es);
        end
        if (es) begin
          int ew, eh;
          ew = exp_w.pop_front(); eh = exp_h.pop_front();
          checks++;
          if (int'(m_w) != ew || int'(m_h) != eh) begin
            failures++;
            $display("FAIL size %0dx%0d, expected %0dx%0d", m_w, m_h, ew, eh);
          end
        end
      end
    end
  end

  task automatic beat(input logic [15:0] d, input logic u, input logic l);
    @(negedge clk);
    while ($urandom_range(0, 99) < 20) @(negedge clk);
    tdata = d; tuser = u; tlast = l; tvalid = 1'b1;
    #1;
    while (!tready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 tvalid = 1'b0;
  endtask

  task automatic frame(input int w, input int h, input int seed, input bit bad_eol);
    cfg_width = dim_t'(w); cfg_height = dim_t'(h);
    exp_w.push_back(w); exp_h.push_back(h);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        logic [15:0] d;
        logic l;
        d = 16'($urandom);
        l = (x == w - 1);
        if (bad_eol && y == 1 && (x == 0 || x == w - 1)) l = !l;
        exp_q.push_back(d[7:0]);
        sof_q.push_back(x == 0 && y == 0);
        beat(d, x == 0 && y == 0, l);
        // changing the registers mid-frame must not matter
        if (x == 0 && y == 0) begin cfg_width = 5'd3; cfg_height = 5'd2; end
      end
  endtask

  initial begin
    int taken_while_off;
    tvalid = 0; tdata = 0; tuser = 0; tlast = 0; enable = 1; m_ready = 0;
    cfg_width = 8; cfg_height = 4;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // junk before the first frame: dropped
    beat(16'h1234, 0, 0);
    beat(16'h5678, 0, 1);
    frame(8, 4, 1, 0);
    frame(5, 3, 2, 1);
    beat(16'hDEAD, 0, 0);
    frame(32, 2, 3, 0);
    frame(1, 6, 4, 0);
    // enable low: the next frame's start-of-frame beat waits until enable
    enable = 0;
    taken_while_off = 0;
    fork
      frame(4, 4, 5, 0);
      begin
        repeat (20) begin @(posedge clk); #1 if (tready && tvalid) taken_while_off++; end
        enable = 1;
      end
    join
    checks++;
    if (taken_while_off != 0) begin
      failures++;
      $display("FAIL start-of-frame taken while disabled");
    end
    repeat (50) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d pixels never came out", exp_q.size());
    end
    checks++;
    if (eol_pulses != 2) begin
      failures++;
      $display("FAIL %0d end-of-line errors, expected 2", eol_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
