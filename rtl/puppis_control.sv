// Control: the main state machine of the accelerator.
//
// It walks through the four phases of the published state diagram (READY -> SOFTMAX -> BOXES ->
// NMS -> SORT -> READY) and, inside each, sequences the data transfers the
// Arbiter routes:
//   SOFTMAX  per layer: load the layer's ECLUT (4096 words) into Memory 0,
//            stream the layer's confidences (boxes x classes) into Softmax,
//            write each score to main memory, class-major:
//            score_addr + 4*(cls*n_total + box);
//   BOXES    load the box exponential table (1024 words) into Memory 1; per
//            box read its 4 modifiers and its anchor (4 words each) into
//            Boxes and store the decoded box in Memory 0 as two words,
//            {xmin,ymin} at 2*box and {xmax,ymax} at 2*box+1;
//   NMS      per class from cls_start: read the class's scores through Serial
//            Comp (only those above TVAL pass, tagged with the box index)
//            into Sort, sort them, then run the greedy loop: the best
//            remaining box is added to the results in Memory 1 and becomes
//            NMS's reference; every later unsuppressed candidate is compared
//            with it and suppressed unless its overlap is below TOVER;
//   SORT     load all results into Sort, sort by score and write the best K to
//            main memory, three words each: {score, class, box},
//            {xmin, ymin}, {xmax, ymax}, at result_addr + 12*k.
// A frame starts on a `start` register write or, with auto-start on, on
// cnn_done (acknowledged by a one-cycle ssd_ack). At the end ssd_done rises
// and stays high until cnn_ack.
//
// The phase order, the per-phase work and the handshake signals follow the
// description. The memory layouts, the one-box-at-a-time sequencing and the
// handshake's pulse/level timing are this design's choices. Layers with zero
// boxes are not supported (every configured layer must hold at least one box).
module puppis_control
  import puppis_pkg::*;
#(
  parameter int unsigned SORT_N   = 64,
  parameter logic [11:0] RES_BASE = 12'h800,
  parameter int unsigned MAX_RES  = 2048,
  localparam int unsigned IW      = $clog2(SORT_N + 1),
  localparam int unsigned XW      = $clog2(SORT_N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  output status_t           status,
  // SSD-CNN handshake
  input  logic              cnn_done,
  output logic              ssd_ack,
  output logic              ssd_done,
  input  logic              cnn_ack,
  // routing
  output phase_e            phase,
  output rd_route_e         rd_route,
  output wr_route_e         wr_route,
  // read commands and Serial Comp
  output logic              rd_cmd_valid,
  input  logic              rd_cmd_ready,
  output logic [AW-1:0]     rd_cmd_addr,
  output logic [23:0]       rd_cmd_len,
  input  logic              rd_busy,
  input  logic              wr_busy,
  input  logic              axi_err,
  output logic              sc_clear,
  output logic              sc_filter_en,
  input  logic              sc_valid,
  // Softmax score writes
  input  logic              sm_score_valid,
  input  logic              sm_score_ready,
  input  logic [CLS_W-1:0]  sm_score_cls,
  output logic [AW-1:0]     sm_wr_addr,
  // Control's own write words
  output logic              ctl_wr_valid,
  input  logic              ctl_wr_ready,
  output logic [AW-1:0]     ctl_wr_addr,
  output logic [DW-1:0]     ctl_wr_data,
  // memories
  output mem_req_t          ctl_mem0,
  input  logic [DW-1:0]     mem0_rdata,
  output mem_req_t          ctl_mem1,
  input  logic [DW-1:0]     mem1_rdata,
  // Boxes
  input  logic              rect_valid,
  input  logic [4*VW-1:0]   rect,
  output logic              rect_ready,
  // NMS
  output logic              nms_valid,
  output logic              nms_first,
  output logic [4*VW-1:0]   nms_box,
  output logic [VW-1:0]     nms_score,
  output logic [7:0]        nms_tag,
  input  logic              keep_valid,
  input  logic              keep,
  input  logic [7:0]        keep_tag,
  // Sort
  output logic              sort_clear,
  output logic              sort_start,
  input  logic              sort_done,
  input  logic [IW-1:0]     sort_count,
  input  logic              sort_overflow,
  output logic [IW-1:0]     sort_rd_idx,
  input  logic [VW-1:0]     sort_rd_key,
  input  logic [15:0]       sort_rd_payload,
  output logic              ctl_sort_push,
  output logic [VW-1:0]     ctl_sort_key,
  output logic [15:0]       ctl_sort_payload
);
  typedef enum logic [5:0] {
    C_READY,
    C_SM_LUT, C_SM_LUTW, C_SM_CONF, C_SM_RUN,
    C_BX_LUT, C_BX_LUTW, C_BX_LOC, C_BX_ANC, C_BX_RECT0, C_BX_RECT1,
    C_NM_CLS, C_NM_RD, C_NM_RDW, C_NM_SORT, C_NM_SORTW,
    C_NM_G0, C_NM_G1, C_NM_G2, C_NM_J0, C_NM_J1, C_NM_J2, C_NM_JW,
    C_ST_INIT, C_ST_LOAD, C_ST_SORT, C_ST_SORTW,
    C_ST_B0, C_ST_B1, C_ST_B2, C_ST_W0, C_ST_W1, C_ST_W2
  } cst_e;

  cst_e st;

  logic [3:0]        layer;
  logic [15:0]       box, gbox, sm_box, layer_end, n_total;
  logic [AW-1:0]     loc_ptr, anc_ptr;
  logic [CLS_W:0]    cls;
  logic [IW-1:0]     g, j, nout;
  logic [SORT_N-1:0] supp;
  logic [7:0]        outstanding;
  logic [15:0]       nres, k;
  logic [DW-1:0]     box_lo, box_hi;
  logic              ld_v;
  logic              frame_ovf;
  logic              done_q;
  logic [15:0]       n_results;

  // total number of boxes over all configured layers
  always_comb begin
    n_total = '0;
    for (int l = 0; l < MAX_LAYERS; l++)
      if (l < int'(cfg.num_layers)) n_total = n_total + cfg.nbox[l];
  end

  // phase seen by the Arbiter and in the status register
  always_comb begin
    unique case (st)
      C_READY: phase = PH_READY;
      C_SM_LUT, C_SM_LUTW, C_SM_CONF, C_SM_RUN: phase = PH_SOFTMAX;
      C_BX_LUT, C_BX_LUTW, C_BX_LOC, C_BX_ANC, C_BX_RECT0, C_BX_RECT1: phase = PH_BOXES;
      C_NM_CLS, C_NM_RD, C_NM_RDW, C_NM_SORT, C_NM_SORTW, C_NM_G0, C_NM_G1, C_NM_G2,
      C_NM_J0, C_NM_J1, C_NM_J2, C_NM_JW: phase = PH_NMS;
      default: phase = PH_SORT;
    endcase
  end

  logic sm_fire, start_req;
  assign sm_fire    = sm_score_valid && sm_score_ready;
  assign start_req  = cfg.start || (cfg.auto_en && cnn_done);
  assign sm_wr_addr = cfg.score_addr +
                      AW'((32'(sm_score_cls) * 32'(n_total) + 32'(sm_box)) << 2);

  // combinational outputs
  always_comb begin
    rd_route         = RD_NONE;
    wr_route         = WR_NONE;
    rd_cmd_valid     = 1'b0;
    rd_cmd_addr      = '0;
    rd_cmd_len       = '0;
    sc_filter_en     = 1'b0;
    ctl_wr_valid     = 1'b0;
    ctl_wr_addr      = cfg.result_addr + AW'({k, 3'b000}) + AW'({k, 2'b00});
    ctl_wr_data      = '0;
    ctl_mem0         = '0;
    ctl_mem1         = '0;
    rect_ready       = 1'b0;
    nms_valid        = 1'b0;
    nms_first        = 1'b0;
    nms_box          = {box_lo, mem0_rdata};
    nms_score        = sort_rd_key;
    nms_tag          = 8'(j);
    sort_start       = 1'b0;
    sort_rd_idx      = '0;
    ctl_sort_push    = ld_v;
    ctl_sort_key     = mem1_rdata[31:16];
    ctl_sort_payload = mem1_rdata[15:0];
    unique case (st)
      C_SM_LUT: begin
        rd_route     = RD_MEM0;
        rd_cmd_valid = 1'b1;
        rd_cmd_addr  = cfg.eclut_addr[layer];
        rd_cmd_len   = 24'(ECLUT_N);
      end
      C_SM_LUTW: rd_route = RD_MEM0;
      C_SM_CONF: begin
        rd_route     = RD_SOFTMAX;
        rd_cmd_valid = 1'b1;
        rd_cmd_addr  = cfg.conf_addr[layer];
        rd_cmd_len   = 24'(24'(cfg.nbox[layer]) * 24'(cfg.num_classes));
      end
      C_SM_RUN: begin
        rd_route = RD_SOFTMAX;
        wr_route = WR_SOFTMAX;
      end
      C_BX_LUT: begin
        rd_route     = RD_MEM1;
        rd_cmd_valid = 1'b1;
        rd_cmd_addr  = cfg.blut_addr;
        rd_cmd_len   = 24'(BLUT_N);
      end
      C_BX_LUTW: rd_route = RD_MEM1;
      C_BX_LOC: begin
        rd_route     = RD_BOXES;
        rd_cmd_valid = 1'b1;
        rd_cmd_addr  = loc_ptr;
        rd_cmd_len   = 24'd4;
      end
      C_BX_ANC: begin
        rd_route     = RD_BOXES;
        rd_cmd_valid = 1'b1;
        rd_cmd_addr  = anc_ptr;
        rd_cmd_len   = 24'd4;
      end
      C_BX_RECT0: begin
        rd_route       = RD_BOXES;
        ctl_mem0.we    = rect_valid;
        ctl_mem0.waddr = 12'({gbox, 1'b0});
        ctl_mem0.wdata = rect[4*VW-1:2*VW];
      end
      C_BX_RECT1: begin
        ctl_mem0.we    = 1'b1;
        ctl_mem0.waddr = 12'({gbox, 1'b1});
        ctl_mem0.wdata = rect[2*VW-1:0];
        rect_ready     = 1'b1;
      end
      C_NM_RD: begin
        rd_route     = RD_SORT;
        sc_filter_en = 1'b1;
        rd_cmd_valid = 1'b1;
        rd_cmd_addr  = cfg.score_addr + AW'((32'(cls) * 32'(n_total)) << 2);
        rd_cmd_len   = 24'(n_total);
      end
      C_NM_RDW: begin
        rd_route     = RD_SORT;
        sc_filter_en = 1'b1;
      end
      C_NM_SORT: sort_start = 1'b1;
      C_NM_G0: begin
        sort_rd_idx    = g;
        ctl_mem0.re    = (g < sort_count) && !supp[XW'(g)];
        ctl_mem0.raddr = 12'({sort_rd_payload, 1'b0});
      end
      C_NM_G1: begin
        sort_rd_idx    = g;
        ctl_mem0.re    = 1'b1;
        ctl_mem0.raddr = 12'({sort_rd_payload, 1'b1});
      end
      C_NM_G2: begin
        sort_rd_idx    = g;
        nms_valid      = 1'b1;
        nms_first      = 1'b1;
        ctl_mem1.we    = (nres < 16'(MAX_RES));
        ctl_mem1.waddr = RES_BASE + 12'(nres);
        ctl_mem1.wdata = {sort_rd_key, CLS_W'(cls), BOX_W'(sort_rd_payload)};
      end
      C_NM_J0: begin
        sort_rd_idx    = j;
        ctl_mem0.re    = (j < sort_count) && !supp[XW'(j)];
        ctl_mem0.raddr = 12'({sort_rd_payload, 1'b0});
      end
      C_NM_J1: begin
        sort_rd_idx    = j;
        ctl_mem0.re    = 1'b1;
        ctl_mem0.raddr = 12'({sort_rd_payload, 1'b1});
      end
      C_NM_J2: begin
        sort_rd_idx = j;
        nms_valid   = 1'b1;
      end
      C_ST_LOAD: begin
        ctl_mem1.re    = (k < nres);
        ctl_mem1.raddr = RES_BASE + 12'(k);
      end
      C_ST_SORT: sort_start = 1'b1;
      C_ST_B0: begin
        sort_rd_idx    = IW'(k);
        ctl_mem0.re    = 1'b1;
        ctl_mem0.raddr = 12'({sort_rd_payload[BOX_W-1:0], 1'b0});
      end
      C_ST_B1: begin
        sort_rd_idx    = IW'(k);
        ctl_mem0.re    = 1'b1;
        ctl_mem0.raddr = 12'({sort_rd_payload[BOX_W-1:0], 1'b1});
      end
      C_ST_W0: begin
        sort_rd_idx  = IW'(k);
        wr_route     = WR_CTRL;
        ctl_wr_valid = 1'b1;
        ctl_wr_data  = {sort_rd_key, sort_rd_payload};
      end
      C_ST_W1: begin
        wr_route     = WR_CTRL;
        ctl_wr_valid = 1'b1;
        ctl_wr_addr  = cfg.result_addr + AW'({k, 3'b000}) + AW'({k, 2'b00}) + 32'd4;
        ctl_wr_data  = box_lo;
      end
      C_ST_W2: begin
        wr_route     = WR_CTRL;
        ctl_wr_valid = 1'b1;
        ctl_wr_addr  = cfg.result_addr + AW'({k, 3'b000}) + AW'({k, 2'b00}) + 32'd8;
        ctl_wr_data  = box_hi;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st          <= C_READY;
      layer       <= '0;
      box         <= '0;
      gbox        <= '0;
      sm_box      <= '0;
      layer_end   <= '0;
      loc_ptr     <= '0;
      anc_ptr     <= '0;
      cls         <= '0;
      g           <= '0;
      j           <= '0;
      nout        <= '0;
      supp        <= '0;
      outstanding <= '0;
      nres        <= '0;
      k           <= '0;
      box_lo      <= '0;
      box_hi      <= '0;
      ld_v        <= 1'b0;
      frame_ovf   <= 1'b0;
      done_q      <= 1'b0;
      n_results   <= '0;
      ssd_ack     <= 1'b0;
      ssd_done    <= 1'b0;
      sc_clear    <= 1'b0;
      sort_clear  <= 1'b0;
    end else begin
      ssd_ack    <= 1'b0;
      sc_clear   <= 1'b0;
      sort_clear <= 1'b0;
      ld_v       <= 1'b0;
      if (ssd_done && cnn_ack) ssd_done <= 1'b0;
      if (sort_overflow) frame_ovf <= 1'b1;

      // NMS results come back in order; a box that overlaps too much is suppressed
      if (keep_valid && !keep) supp[XW'(keep_tag)] <= 1'b1;
      outstanding <= outstanding + ((st == C_NM_J2) ? 8'd1 : 8'd0) - (keep_valid ? 8'd1 : 8'd0);

      unique case (st)
        // ---------------------------------------------------------- READY
        C_READY: if (start_req && !ssd_done) begin
          ssd_ack   <= cfg.auto_en && cnn_done;
          done_q    <= 1'b0;
          frame_ovf <= 1'b0;
          layer     <= '0;
          sm_box    <= '0;
          layer_end <= cfg.nbox[0];
          sc_clear  <= 1'b1;
          st        <= C_SM_LUT;
        end
        // -------------------------------------------------------- SOFTMAX
        C_SM_LUT:  if (rd_cmd_ready) st <= C_SM_LUTW;
        C_SM_LUTW: if (!rd_busy && !sc_valid) st <= C_SM_CONF;
        C_SM_CONF: if (rd_cmd_ready) st <= C_SM_RUN;
        C_SM_RUN: begin
          if (sm_fire && ({1'b0, sm_score_cls} == cfg.num_classes - 1'b1))
            sm_box <= sm_box + 1'b1;
          if (sm_box == layer_end && !wr_busy) begin
            sc_clear <= 1'b1;
            if (layer + 1'b1 < cfg.num_layers) begin
              layer     <= layer + 1'b1;
              layer_end <= layer_end + cfg.nbox[layer + 1'b1];
              st        <= C_SM_LUT;
            end else begin
              st <= C_BX_LUT;
            end
          end
        end
        // ---------------------------------------------------------- BOXES
        C_BX_LUT:  if (rd_cmd_ready) st <= C_BX_LUTW;
        C_BX_LUTW: if (!rd_busy && !sc_valid) begin
          layer   <= '0;
          box     <= '0;
          gbox    <= '0;
          loc_ptr <= cfg.loc_addr[0];
          anc_ptr <= cfg.anchor_addr;
          st      <= C_BX_LOC;
        end
        C_BX_LOC:   if (rd_cmd_ready) st <= C_BX_ANC;
        C_BX_ANC:   if (rd_cmd_ready) st <= C_BX_RECT0;
        C_BX_RECT0: if (rect_valid) st <= C_BX_RECT1;
        C_BX_RECT1: begin
          gbox    <= gbox + 1'b1;
          anc_ptr <= anc_ptr + 32'd16;
          if (box + 1'b1 == cfg.nbox[layer]) begin
            box <= '0;
            if (layer + 1'b1 < cfg.num_layers) begin
              layer   <= layer + 1'b1;
              loc_ptr <= cfg.loc_addr[layer + 1'b1];
              st      <= C_BX_LOC;
            end else begin
              cls  <= cfg.cls_start;
              nres <= '0;
              st   <= C_NM_CLS;
            end
          end else begin
            box     <= box + 1'b1;
            loc_ptr <= loc_ptr + 32'd16;
            st      <= C_BX_LOC;
          end
        end
        // ------------------------------------------------------------ NMS
        C_NM_CLS: begin
          if (cls >= cfg.num_classes) begin
            sort_clear <= 1'b1;
            k          <= '0;
            st         <= C_ST_INIT;
          end else begin
            sort_clear <= 1'b1;
            sc_clear   <= 1'b1;
            st         <= C_NM_RD;
          end
        end
        C_NM_RD:    if (rd_cmd_ready) st <= C_NM_RDW;
        C_NM_RDW:   if (!rd_busy && !sc_valid) st <= C_NM_SORT;
        C_NM_SORT:  st <= C_NM_SORTW;
        C_NM_SORTW: if (sort_done) begin
          g    <= '0;
          supp <= '0;
          st   <= C_NM_G0;
        end
        C_NM_G0: begin
          if (g >= sort_count) begin
            cls <= cls + 1'b1;
            st  <= C_NM_CLS;
          end else if (supp[XW'(g)]) begin
            g <= g + 1'b1;
          end else begin
            st <= C_NM_G1;
          end
        end
        C_NM_G1: begin
          box_lo <= mem0_rdata;
          st     <= C_NM_G2;
        end
        C_NM_G2: begin
          if (nres < 16'(MAX_RES)) nres <= nres + 1'b1;
          j  <= g + 1'b1;
          st <= C_NM_J0;
        end
        C_NM_J0: begin
          if (j >= sort_count)  st <= C_NM_JW;
          else if (supp[XW'(j)])     j  <= j + 1'b1;
          else                  st <= C_NM_J1;
        end
        C_NM_J1: begin
          box_lo <= mem0_rdata;
          st     <= C_NM_J2;
        end
        C_NM_J2: begin
          j  <= j + 1'b1;
          st <= C_NM_J0;
        end
        C_NM_JW: if (outstanding == '0 && !keep_valid) begin
          g  <= g + 1'b1;
          st <= C_NM_G0;
        end
        // ----------------------------------------------------------- SORT
        C_ST_INIT: st <= C_ST_LOAD;
        C_ST_LOAD: begin
          if (k < nres) begin
            k    <= k + 1'b1;
            ld_v <= 1'b1;
          end else if (!ld_v) begin
            st <= C_ST_SORT;
          end
        end
        C_ST_SORT:  st <= C_ST_SORTW;
        C_ST_SORTW: if (sort_done) begin
          k    <= '0;
          nout <= (IW'(cfg.topk) < sort_count) ? IW'(cfg.topk) : sort_count;
          st   <= C_ST_B0;
        end
        C_ST_B0: begin
          if (k >= 16'(nout)) begin
            // finished once the last result word has been written
            if (!wr_busy) begin
            n_results <= 16'(nout);
            done_q    <= 1'b1;
            ssd_done  <= 1'b1;
            st        <= C_READY;
            end
          end else begin
            st <= C_ST_B1;
          end
        end
        C_ST_B1: begin
          box_lo <= mem0_rdata;
          st     <= C_ST_B2;
        end
        C_ST_B2: begin
          box_hi <= mem0_rdata;
          st     <= C_ST_W0;
        end
        C_ST_W0: if (ctl_wr_ready) st <= C_ST_W1;
        C_ST_W1: if (ctl_wr_ready) st <= C_ST_W2;
        C_ST_W2: if (ctl_wr_ready) begin
          k  <= k + 1'b1;
          st <= C_ST_B0;
        end
        default: st <= C_READY;
      endcase
    end
  end

  assign status.phase     = phase;
  assign status.done      = done_q;
  assign status.overflow  = frame_ovf;
  assign status.err       = axi_err;
  assign status.n_results = n_results;
endmodule
