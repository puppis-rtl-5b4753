// Puppis: hardware accelerator for the post-processing head of a
// Single-Shot Multibox Detector (SSD).
//
// A CNN accelerator computes the backbone network and the SSD confidence and
// box-modifier convolution layers into main memory, then raises cnn_done.
// Puppis reads those results over its AXI4 master port and produces the final
// detections: per box and class a softmax score, per box a decoded bounding
// box, per class non-maximum suppression, and finally the K best detections,
// written back to main memory; ssd_done tells the CNN accelerator it is
// finished. Software configures it over AXI4-Lite (see puppis_regs).
//
// Blocks (as in the architecture overview): Regs, Control, Arbiter, AXI-full
// Control, Serial Comp, Softmax, Boxes, NMS, the helper units Divider (shared
// by Softmax and NMS), Mults (shared by Boxes and NMS) and Sort, and the two
// internal memories Memory 0 and Memory 1. Which user owns a shared unit
// follows the current phase of Control.
//
// Clocking and reset: one clock; rst_n is an active-low synchronous reset.
module puppis_top
  import puppis_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 4096,
  parameter int unsigned SORT_N    = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  // SSD-CNN handshake
  input  logic            cnn_done,
  output logic            ssd_ack,
  output logic            ssd_done,
  input  logic            cnn_ack,
  // configuration and status, AXI4-Lite slave
  input  logic [7:0]      s_axil_awaddr,
  input  logic            s_axil_awvalid,
  output logic            s_axil_awready,
  input  logic [31:0]     s_axil_wdata,
  input  logic            s_axil_wvalid,
  output logic            s_axil_wready,
  output logic [1:0]      s_axil_bresp,
  output logic            s_axil_bvalid,
  input  logic            s_axil_bready,
  input  logic [7:0]      s_axil_araddr,
  input  logic            s_axil_arvalid,
  output logic            s_axil_arready,
  output logic [31:0]     s_axil_rdata,
  output logic [1:0]      s_axil_rresp,
  output logic            s_axil_rvalid,
  input  logic            s_axil_rready,
  // data, AXI4 master
  output logic [AW-1:0]   m_axi_araddr,
  output logic [7:0]      m_axi_arlen,
  output logic [2:0]      m_axi_arsize,
  output logic [1:0]      m_axi_arburst,
  output logic            m_axi_arvalid,
  input  logic            m_axi_arready,
  input  logic [DW-1:0]   m_axi_rdata,
  input  logic [1:0]      m_axi_rresp,
  input  logic            m_axi_rlast,
  input  logic            m_axi_rvalid,
  output logic            m_axi_rready,
  output logic [AW-1:0]   m_axi_awaddr,
  output logic [7:0]      m_axi_awlen,
  output logic [2:0]      m_axi_awsize,
  output logic [1:0]      m_axi_awburst,
  output logic            m_axi_awvalid,
  input  logic            m_axi_awready,
  output logic [DW-1:0]   m_axi_wdata,
  output logic [DW/8-1:0] m_axi_wstrb,
  output logic            m_axi_wlast,
  output logic            m_axi_wvalid,
  input  logic            m_axi_wready,
  input  logic [1:0]      m_axi_bresp,
  input  logic            m_axi_bvalid,
  output logic            m_axi_bready
);
  localparam int unsigned IW   = $clog2(SORT_N + 1);
  localparam int unsigned TAGW = VW + 8;

  cfg_t      cfg;
  status_t   status;
  phase_e    phase;
  rd_route_e rd_route;
  wr_route_e wr_route;

  // ---------------------------------------------------------------- Regs
  puppis_regs u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready, .s_axil_wdata, .s_axil_wvalid,
    .s_axil_wready, .s_axil_bresp, .s_axil_bvalid, .s_axil_bready, .s_axil_araddr,
    .s_axil_arvalid, .s_axil_arready, .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid,
    .s_axil_rready, .cfg, .status
  );

  // ---------------------------------------------------- AXI-full Control
  logic          rd_cmd_valid, rd_cmd_ready, rd_busy, wr_busy, axi_err;
  logic [AW-1:0] rd_cmd_addr;
  logic [23:0]   rd_cmd_len;
  logic          rs_valid, rs_ready;
  logic [DW-1:0] rs_data;
  logic          ws_valid, ws_ready;
  logic [AW-1:0] ws_addr;
  logic [DW-1:0] ws_data;

  puppis_axi_full_ctrl #(.AW(AW), .DW(DW), .LW(24)) u_axi (
    .clk, .rst_n,
    .rd_cmd_valid, .rd_cmd_ready, .rd_cmd_addr, .rd_cmd_len,
    .rd_valid(rs_valid), .rd_ready(rs_ready), .rd_data(rs_data), .rd_busy,
    .wr_valid(ws_valid), .wr_ready(ws_ready), .wr_addr(ws_addr), .wr_data(ws_data),
    .wr_busy, .err(axi_err),
    .m_axi_araddr, .m_axi_arlen, .m_axi_arsize, .m_axi_arburst, .m_axi_arvalid,
    .m_axi_arready, .m_axi_rdata, .m_axi_rresp, .m_axi_rlast, .m_axi_rvalid, .m_axi_rready,
    .m_axi_awaddr, .m_axi_awlen, .m_axi_awsize, .m_axi_awburst, .m_axi_awvalid,
    .m_axi_awready, .m_axi_wdata, .m_axi_wstrb, .m_axi_wlast, .m_axi_wvalid, .m_axi_wready,
    .m_axi_bresp, .m_axi_bvalid, .m_axi_bready
  );

  // --------------------------------------------------------- Serial Comp
  logic          sc_clear, sc_filter_en, sc_valid, sc_ready;
  logic [DW-1:0] sc_data;
  logic [15:0]   sc_idx;

  puppis_serial_comp #(.DW(DW), .IW(16)) u_serial_comp (
    .clk, .rst_n, .clear(sc_clear), .filter_en(sc_filter_en), .threshold(cfg.tval),
    .in_valid(rs_valid), .in_ready(rs_ready), .in_data(rs_data),
    .out_valid(sc_valid), .out_ready(sc_ready), .out_data(sc_data), .out_idx(sc_idx)
  );

  // ------------------------------------------------------------ memories
  mem_req_t      mem0, mem1, ctl_mem0, ctl_mem1, sm_imem;
  logic [DW-1:0] mem0_rdata, mem1_rdata;

  puppis_mem #(.DEPTH(MEM_DEPTH), .WIDTH(DW)) u_mem0 (
    .clk, .we(mem0.we), .waddr(mem0.waddr), .wdata(mem0.wdata),
    .re(mem0.re), .raddr(mem0.raddr), .rdata(mem0_rdata)
  );
  puppis_mem #(.DEPTH(MEM_DEPTH), .WIDTH(DW)) u_mem1 (
    .clk, .we(mem1.we), .waddr(mem1.waddr), .wdata(mem1.wdata),
    .re(mem1.re), .raddr(mem1.raddr), .rdata(mem1_rdata)
  );

  // ------------------------------------------------- shared Mults / Divider
  logic [3:0]                m_valid, m_out_valid, bx_m_valid;
  logic signed [VW-1:0]      m_a [4], m_b [4], bx_m_a [4], bx_m_b [4];
  logic signed [2*VW-1:0]    m_p [4];
  logic [1:0]                nm_m_valid;
  logic signed [VW-1:0]      nm_m_a [2], nm_m_b [2];

  always_comb begin
    if (phase == PH_NMS) begin
      m_valid = {2'b00, nm_m_valid};
      m_a[0] = nm_m_a[0]; m_b[0] = nm_m_b[0];
      m_a[1] = nm_m_a[1]; m_b[1] = nm_m_b[1];
      m_a[2] = '0;        m_b[2] = '0;
      m_a[3] = '0;        m_b[3] = '0;
    end else begin
      m_valid = bx_m_valid;
      m_a = bx_m_a;
      m_b = bx_m_b;
    end
  end

  puppis_mults #(.LANES(4), .W(VW)) u_mults (
    .clk, .rst_n, .in_valid(m_valid), .a(m_a), .b(m_b), .out_valid(m_out_valid), .p(m_p)
  );

  logic            div_valid, div_out_valid, sm_div_valid, nm_div_valid;
  logic [31:0]     div_a, div_b, nm_div0, nm_div1;
  logic [VW-1:0]   sm_div_a, sm_div_b, div_q;
  logic [TAGW-1:0] div_tag, div_out_tag, nm_div_tag;
  logic [CLS_W-1:0] sm_div_tag;

  always_comb begin
    if (phase == PH_NMS) begin
      div_valid = nm_div_valid;
      div_a     = nm_div0;
      div_b     = nm_div1;
      div_tag   = nm_div_tag;
    end else begin
      div_valid = sm_div_valid;
      div_a     = 32'(sm_div_a);
      div_b     = 32'(sm_div_b);
      div_tag   = TAGW'(sm_div_tag);
    end
  end

  puppis_divider #(.NW(32), .TAGW(TAGW)) u_divider (
    .clk, .rst_n, .in_valid(div_valid), .a(div_a), .b(div_b), .in_tag(div_tag),
    .out_valid(div_out_valid), .q(div_q), .out_tag(div_out_tag)
  );

  // ------------------------------------------------------------- Softmax
  logic             sm_cnf_valid, sm_cnf_ready, sm_eclut_re, sm_busy;
  logic [VW-1:0]    sm_cnf_data, sm_score;
  logic [11:0]      sm_eclut_addr;
  logic             sm_score_valid, sm_score_ready;
  logic [CLS_W-1:0] sm_score_cls;
  logic [AW-1:0]    sm_wr_addr;

  puppis_softmax u_softmax (
    .clk, .rst_n, .num_classes(cfg.num_classes),
    .cnf_valid(sm_cnf_valid), .cnf_ready(sm_cnf_ready), .cnf_in(sm_cnf_data),
    .eclut_re(sm_eclut_re), .eclut_addr(sm_eclut_addr), .eclut_in(mem0_rdata),
    .imem(sm_imem), .imem_rdata(mem1_rdata),
    .div_valid(sm_div_valid), .div_a(sm_div_a), .div_b(sm_div_b), .div_tag(sm_div_tag),
    .div_in_valid(div_out_valid && phase == PH_SOFTMAX), .div_in(div_q),
    .div_in_tag(div_out_tag[CLS_W-1:0]),
    .score_valid(sm_score_valid), .score_ready(sm_score_ready), .score_out(sm_score),
    .score_cls(sm_score_cls), .busy(sm_busy)
  );

  // --------------------------------------------------------------- Boxes
  logic             bx_in_valid, bx_in_ready, bx_lut_re, rect_valid, rect_ready;
  logic [VW-1:0]    bx_in_data;
  logic [11:0]      bx_lut_addr;
  logic [4*VW-1:0]  rect;

  puppis_boxes u_boxes (
    .clk, .rst_n, .var_x(cfg.var_x), .var_y(cfg.var_y), .var_w(cfg.var_w), .var_h(cfg.var_h),
    .sh1(cfg.sh1), .sh2(cfg.sh2),
    .in_valid(bx_in_valid), .in_ready(bx_in_ready), .in_data(bx_in_data),
    .m_valid(bx_m_valid), .m_a(bx_m_a), .m_b(bx_m_b), .m_out_valid(m_out_valid), .m_p(m_p),
    .lut_re(bx_lut_re), .lut_addr(bx_lut_addr), .lut_in(mem1_rdata),
    .rect_valid, .rect_ready, .rect_out(rect)
  );

  // ----------------------------------------------------------------- NMS
  logic            nms_valid, nms_first, keep_valid, keep;
  logic [4*VW-1:0] nms_box;
  logic [VW-1:0]   nms_score, keep_score;
  logic [7:0]      nms_tag, keep_tag;
  logic signed [2*VW-1:0] nm_m_p [2];

  assign nm_m_p[0] = m_p[0];
  assign nm_m_p[1] = m_p[1];

  puppis_nms #(.MUL_LAT(2), .TAGW(8)) u_nms (
    .clk, .rst_n, .tover(cfg.tover),
    .in_valid(nms_valid), .in_first(nms_first),
    .x_min_in(nms_box[63:48]), .y_min_in(nms_box[47:32]),
    .x_max_in(nms_box[31:16]), .y_max_in(nms_box[15:0]),
    .score_in(nms_score), .tag_in(nms_tag),
    .m_valid(nm_m_valid), .m_a(nm_m_a), .m_b(nm_m_b), .m_p(nm_m_p),
    .div_valid(nm_div_valid), .div0_out(nm_div0), .div1_out(nm_div1), .div_tag(nm_div_tag),
    .div_in_valid(div_out_valid && phase == PH_NMS), .div_in(div_q), .div_in_tag(div_out_tag),
    .keep_valid, .keep_out(keep), .res_score(keep_score), .res_tag(keep_tag)
  );

  // ---------------------------------------------------------------- Sort
  logic            sort_clear, sort_start, sort_busy, sort_done, sort_overflow;
  logic            sort_push, ctl_sort_push;
  logic [VW-1:0]   sort_key, ctl_sort_key, sort_rd_key;
  logic [15:0]     sort_payload, ctl_sort_payload, sort_rd_payload;
  logic [IW-1:0]   sort_count, sort_rd_idx;

  puppis_sort #(.N(SORT_N), .KW(VW), .PW(16)) u_sort (
    .clk, .rst_n, .clear(sort_clear), .push(sort_push), .push_key(sort_key),
    .push_payload(sort_payload), .start(sort_start), .busy(sort_busy), .done(sort_done),
    .count(sort_count), .overflow(sort_overflow), .rd_idx(sort_rd_idx),
    .rd_key(sort_rd_key), .rd_payload(sort_rd_payload)
  );

  // ------------------------------------------------------------- Arbiter
  logic          ctl_wr_valid, ctl_wr_ready;
  logic [AW-1:0] ctl_wr_addr;
  logic [DW-1:0] ctl_wr_data;

  puppis_arbiter u_arbiter (
    .phase, .rd_route, .wr_route,
    .sc_valid, .sc_ready, .sc_data, .sc_idx,
    .sm_cnf_valid, .sm_cnf_ready, .sm_cnf_data, .sm_eclut_re, .sm_eclut_addr, .sm_imem,
    .sm_score_valid, .sm_score_ready, .sm_score, .sm_wr_addr,
    .bx_in_valid, .bx_in_ready, .bx_in_data, .bx_lut_re, .bx_lut_addr,
    .ctl_sort_push, .ctl_sort_key, .ctl_sort_payload, .sort_push, .sort_key, .sort_payload,
    .ctl_mem0, .ctl_mem1, .ctl_wr_valid, .ctl_wr_ready, .ctl_wr_addr, .ctl_wr_data,
    .mem0, .mem1,
    .wr_valid(ws_valid), .wr_ready(ws_ready), .wr_addr(ws_addr), .wr_data(ws_data)
  );

  // ------------------------------------------------------------- Control
  puppis_control #(.SORT_N(SORT_N), .RES_BASE(12'h800), .MAX_RES(MEM_DEPTH / 2)) u_control (
    .clk, .rst_n, .cfg, .status,
    .cnn_done, .ssd_ack, .ssd_done, .cnn_ack,
    .phase, .rd_route, .wr_route,
    .rd_cmd_valid, .rd_cmd_ready, .rd_cmd_addr, .rd_cmd_len, .rd_busy, .wr_busy, .axi_err,
    .sc_clear, .sc_filter_en, .sc_valid,
    .sm_score_valid, .sm_score_ready, .sm_score_cls, .sm_wr_addr,
    .ctl_wr_valid, .ctl_wr_ready, .ctl_wr_addr, .ctl_wr_data,
    .ctl_mem0, .mem0_rdata, .ctl_mem1, .mem1_rdata,
    .rect_valid, .rect, .rect_ready,
    .nms_valid, .nms_first, .nms_box, .nms_score, .nms_tag, .keep_valid, .keep, .keep_tag,
    .sort_clear, .sort_start, .sort_done, .sort_count, .sort_overflow, .sort_rd_idx,
    .sort_rd_key, .sort_rd_payload, .ctl_sort_push, .ctl_sort_key, .ctl_sort_payload
  );
endmodule
