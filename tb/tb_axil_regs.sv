// tb_axil_regs: self-checking test of the AXI4-Lite register file.
//
// Checks the reset values, write and read-back of every register with its
// field mask, byte-strobe writes, address and data arriving in either order
// or together, SLVERR for unmapped and misaligned addresses, the decoded
// configuration outputs, the frame counter and the end-of-line error
// counter (including its clear on write), and response back-pressure.
module tb_axil_regs;
  import video_filter_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [5:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        enable, frame_done, eol_err;
  dim_t        cfg_width, cfg_height;
  filter_cfg_t cfg;
  int          checks = 0, failures = 0;

  axil_regs #(.ADDR_W(6)) dut (
    .clk(clk), .rst_n(rst_n),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .enable(enable), .cfg_width(cfg_width), .cfg_height(cfg_height), .cfg(cfg),
    .frame_done(frame_done), .eol_err(eol_err));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h, expected %h", what, got, want);
    end
  endtask

  // order: 0 address first, 1 data first, 2 together
  task automatic wr(input logic [5:0] a, input logic [31:0] d, input logic [3:0] s,
                    input int order, output logic [1:0] resp);
    @(negedge clk);
    if (order != 1) begin awaddr = a; awvalid = 1; end
    if (order != 0) begin wdata = d; wstrb = s; wvalid = 1; end
    fork
      begin
        if (order == 1) begin repeat (2) @(negedge clk); awaddr = a; awvalid = 1; end
        #1; while (!awready) begin @(negedge clk); #1; end
        @(posedge clk); #1 awvalid = 0;
      end
      begin
        if (order == 0) begin repeat (3) @(negedge clk); wdata = d; wstrb = s; wvalid = 1; end
        #1; while (!wready) begin @(negedge clk); #1; end
        @(posedge clk); #1 wvalid = 0;
      end
    join
    // hold bready low a little to test response back-pressure
    repeat ($urandom_range(0, 3)) @(negedge clk);
    bready = 1;
    #1; while (!bvalid) begin @(negedge clk); #1; end
    resp = bresp;
    @(posedge clk); #1 bready = 0;
  endtask

  task automatic rd(input logic [5:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    araddr = a; arvalid = 1;
    #1; while (!arready) begin @(negedge clk); #1; end
    @(posedge clk); #1 arvalid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    rready = 1;
    #1; while (!rvalid) begin @(negedge clk); #1; end
    d = rdata; resp = rresp;
    @(posedge clk); #1 rready = 0;
  endtask

  task automatic pulse(ref logic sig, input int n);
    repeat (n) begin
      @(negedge clk); sig = 1;
      @(negedge clk); sig = 0;
    end
  endtask

  initial begin
    logic [31:0] d;
    logic [1:0]  r;
    logic [5:0]  addrs [7] = '{REG_CTRL, REG_WIDTH, REG_HEIGHT, REG_MODE, REG_THRESH, REG_MAXVAL, REG_POSTBITS};
    logic [31:0] masks [7] = '{32'h1, 32'h7FF, 32'h7FF, 32'h7, 32'hFF, 32'hFF, 32'hF};
    logic [31:0] resets [7] = '{32'd0, 32'd1920, 32'd1080, 32'd1, 32'd128, 32'd255, 32'd2};
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0; frame_done = 0; eol_err = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    foreach (addrs[i]) begin
      rd(addrs[i], d, r);
      check($sformatf("reset value @%h", addrs[i]), d, resets[i]);
      check("read resp", 32'(r), 32'd0);
    end
    check("reset enable", 32'(enable), 0);
    check("reset width", 32'(cfg_width), 1920);
    check("reset mode", 32'(cfg.mode), 32'(MODE_SOBEL));

    foreach (addrs[i]) begin
      logic [31:0] v;
      v = $urandom;
      wr(addrs[i], v, 4'hF, i % 3, r);
      check("write resp", 32'(r), 32'd0);
      rd(addrs[i], d, r);
      check($sformatf("read back @%h", addrs[i]), d, v & masks[i]);
    end

    // decoded outputs
    wr(REG_CTRL, 32'h1, 4'hF, 2, r);
    wr(REG_WIDTH, 32'd640, 4'hF, 0, r);
    wr(REG_HEIGHT, 32'd480, 4'hF, 1, r);
    wr(REG_MODE, 32'd4, 4'hF, 2, r);
    wr(REG_THRESH, 32'd77, 4'hF, 0, r);
    wr(REG_MAXVAL, 32'd200, 4'hF, 1, r);
    wr(REG_POSTBITS, 32'd3, 4'hF, 2, r);
    check("enable", 32'(enable), 1);
    check("cfg_width", 32'(cfg_width), 640);
    check("cfg_height", 32'(cfg_height), 480);
    check("mode", 32'(cfg.mode), 4);
    check("thresh", 32'(cfg.thresh), 77);
    check("maxval", 32'(cfg.maxval), 200);
    check("post_bits", 32'(cfg.post_bits), 3);

    // byte strobes: only byte 1 of WIDTH changes (640 = 0x280 -> 0x580)
    wr(REG_WIDTH, 32'h0000_0500, 4'b0010, 0, r);
    rd(REG_WIDTH, d, r);
    check("strobed write", d, 32'h580);
    wr(REG_THRESH, 32'h0000_00FF, 4'b0000, 1, r);
    rd(REG_THRESH, d, r);
    check("no-strobe write", d, 32'd77);

    // unmapped and misaligned addresses
    wr(6'h24, 32'h1, 4'hF, 2, r);
    check("unmapped write resp", 32'(r), 32'd2);
    rd(6'h3C, d, r);
    check("unmapped read resp", 32'(r), 32'd2);
    check("unmapped read data", d, 0);
    rd(6'h06, d, r);
    check("misaligned read resp", 32'(r), 32'd2);

    // status counters
    pulse(frame_done, 5);
    pulse(eol_err, 3);
    rd(REG_FRAMES, d, r);
    check("frame counter", d, 5);
    rd(REG_EOLERR, d, r);
    check("eol error counter", d, 3);
    wr(REG_FRAMES, 32'd99, 4'hF, 0, r);
    rd(REG_FRAMES, d, r);
    check("frame counter read only", d, 5);
    wr(REG_EOLERR, 32'd0, 4'hF, 2, r);
    rd(REG_EOLERR, d, r);
    check("eol error counter cleared", d, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
