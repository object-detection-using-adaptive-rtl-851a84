// axil_regs: AXI4-Lite configuration and status registers of the filter core.
//
// Holds the settings the processor writes (enable, frame width and height,
// filter mode, threshold, value above threshold, posterize bits) and two
// status counters it reads: frames sent and end-of-line errors seen on the
// input. Register map (byte offsets, 32-bit registers):
//   0x00 CTRL      [0] enable                       reset 0
//   0x04 WIDTH     [10:0] pixels per line           reset 1920
//   0x08 HEIGHT    [10:0] lines per frame           reset 1080
//   0x0C MODE      [2:0] 0 bypass, 1 Sobel, 2 threshold, 3 posterize,
//                  4 threshold of Sobel             reset 1
//   0x10 THRESH    [7:0]                            reset 128
//   0x14 MAXVAL    [7:0]                            reset 255
//   0x18 POSTBITS  [3:0]                            reset 2
//   0x1C FRAMES    read only, frames sent (wraps)
//   0x20 EOLERR    end-of-line errors; any write clears it
// A write is done when both address and data have arrived (in either order);
// wstrb byte lanes are honoured. Unmapped addresses answer SLVERR (reads
// return 0). One write and one read can be in flight at a time; responses
// come one cycle after the request is complete. The register map and reset
// values are this design's own; the core being set up through AXI4-Lite
// registers, including its frame dimensions, follows the core's design.
module axil_regs
  import video_filter_pkg::*;
#(
  parameter int unsigned ADDR_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // configuration out
  output logic              enable,
  output dim_t              cfg_width,
  output dim_t              cfg_height,
  output filter_cfg_t       cfg,
  // status events in
  input  logic              frame_done,
  input  logic              eol_err
);

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

  logic [ADDR_W-1:0] aw_q;
  logic              aw_have, w_have;
  logic [31:0]       wd_q;
  logic [3:0]        ws_q;
  logic [31:0]       frames, eolerrs;
  logic [31:0]       r_ctrl, r_width, r_height, r_mode, r_thresh, r_maxval, r_post;
  logic              do_write;

  assign s_axil_awready = !aw_have && !s_axil_bvalid;
  assign s_axil_wready  = !w_have  && !s_axil_bvalid;
  assign s_axil_arready = !s_axil_rvalid;
  assign do_write       = aw_have && w_have;

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] s);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = s[b] ? d[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  function automatic logic mapped(logic [ADDR_W-1:0] a);
    return (a[1:0] == 2'b00) && (a <= ADDR_W'(REG_EOLERR));
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_have       <= 1'b0;
      w_have        <= 1'b0;
      aw_q          <= '0;
      wd_q          <= '0;
      ws_q          <= '0;
      s_axil_bvalid <= 1'b0;
      s_axil_bresp  <= RESP_OKAY;
      s_axil_rvalid <= 1'b0;
      s_axil_rresp  <= RESP_OKAY;
      s_axil_rdata  <= '0;
      r_ctrl        <= 32'd0;
      r_width       <= 32'd1920;
      r_height      <= 32'd1080;
      r_mode        <= 32'(MODE_SOBEL);
      r_thresh      <= 32'd128;
      r_maxval      <= 32'd255;
      r_post        <= 32'd2;
      frames        <= '0;
      eolerrs       <= '0;
    end else begin
      if (frame_done) frames <= frames + 32'd1;
      if (eol_err)    eolerrs <= eolerrs + 32'd1;

      if (s_axil_awvalid && s_axil_awready) begin
        aw_q    <= s_axil_awaddr;
        aw_have <= 1'b1;
      end
      if (s_axil_wvalid && s_axil_wready) begin
        wd_q   <= s_axil_wdata;
        ws_q   <= s_axil_wstrb;
        w_have <= 1'b1;
      end
      if (do_write) begin
        aw_have       <= 1'b0;
        w_have        <= 1'b0;
        s_axil_bvalid <= 1'b1;
        s_axil_bresp  <= mapped(aw_q) ? RESP_OKAY : RESP_SLVERR;
        case (aw_q)
          ADDR_W'(REG_CTRL):     r_ctrl   <= merge(r_ctrl,   wd_q, ws_q) & 32'h1;
          ADDR_W'(REG_WIDTH):    r_width  <= merge(r_width,  wd_q, ws_q) & 32'h7FF;
          ADDR_W'(REG_HEIGHT):   r_height <= merge(r_height, wd_q, ws_q) & 32'h7FF;
          ADDR_W'(REG_MODE):     r_mode   <= merge(r_mode,   wd_q, ws_q) & 32'h7;
          ADDR_W'(REG_THRESH):   r_thresh <= merge(r_thresh, wd_q, ws_q) & 32'hFF;
          ADDR_W'(REG_MAXVAL):   r_maxval <= merge(r_maxval, wd_q, ws_q) & 32'hFF;
          ADDR_W'(REG_POSTBITS): r_post   <= merge(r_post,   wd_q, ws_q) & 32'hF;
          ADDR_W'(REG_EOLERR):   eolerrs  <= '0;
          default: ;
        endcase
      end
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;

      if (s_axil_arvalid && s_axil_arready) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rresp  <= mapped(s_axil_araddr) ? RESP_OKAY : RESP_SLVERR;
        case (s_axil_araddr)
          ADDR_W'(REG_CTRL):     s_axil_rdata <= r_ctrl;
          ADDR_W'(REG_WIDTH):    s_axil_rdata <= r_width;
          ADDR_W'(REG_HEIGHT):   s_axil_rdata <= r_height;
          ADDR_W'(REG_MODE):     s_axil_rdata <= r_mode;
          ADDR_W'(REG_THRESH):   s_axil_rdata <= r_thresh;
          ADDR_W'(REG_MAXVAL):   s_axil_rdata <= r_maxval;
          ADDR_W'(REG_POSTBITS): s_axil_rdata <= r_post;
          ADDR_W'(REG_FRAMES):   s_axil_rdata <= frames;
          ADDR_W'(REG_EOLERR):   s_axil_rdata <= eolerrs;
          default:               s_axil_rdata <= '0;
        endcase
      end else if (s_axil_rvalid && s_axil_rready) begin
        s_axil_rvalid <= 1'b0;
      end
    end
  end

  always_comb begin
    enable        = r_ctrl[0];
    cfg_width     = dim_t'(r_width);
    cfg_height    = dim_t'(r_height);
    cfg.mode      = mode_e'(r_mode[2:0]);
    cfg.thresh    = pix_t'(r_thresh);
    cfg.maxval    = pix_t'(r_maxval);
    cfg.post_bits = r_post[3:0];
  end

  a_bhold: assert property (@(posedge clk) disable iff (!rst_n)
    (s_axil_bvalid && !s_axil_bready) |=> s_axil_bvalid);
  a_rhold: assert property (@(posedge clk) disable iff (!rst_n)
    (s_axil_rvalid && !s_axil_rready) |=> s_axil_rvalid && $stable(s_axil_rdata));

endmodule
