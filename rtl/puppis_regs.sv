// Regs: configuration and status registers behind an AXI4-Lite slave.
//
// Software (or the translator's output loaded by software) sets up one frame
// here: the number of classes and of SSD layer pairs, where each layer's
// confidences, box modifiers and ECLUT lie in main memory, where anchors, the
// box exponential LUT, scores and results go, the variances, barrel-shift
// amounts, thresholds and K. The description names the module and its role;
// the register map is this design's own:
//
//   0x00 CTRL       [0] start (write 1, self-clearing)  [1] auto-start on cnn_done
//   0x04 STATUS     [2:0] phase [3] done [4] overflow [5] err [31:16] results (read only)
//   0x08 NUM_CLASSES   0x0C NUM_LAYERS   0x10 ANCHOR_ADDR  0x14 BLUT_ADDR
//   0x18 SCORE_ADDR    0x1C RESULT_ADDR  0x20 VAR_XY {Yv,Xv} 0x24 VAR_WH {Hv,Wv}
//   0x28 SHIFTS {sh2[12:8], sh1[4:0]}    0x2C TVAL  0x30 TOVER  0x34 TOPK
//   0x38 CLS_START
//   0x40 + 16*l  NBOX[l], CONF_ADDR[l], LOC_ADDR[l], ECLUT_ADDR[l]
//
// AXI-Lite: a write is taken when AWVALID and WVALID are both high and no
// response is pending; BVALID follows one cycle later. A read answers one
// cycle after ARVALID. Unmapped addresses read as zero and ignore writes.
module puppis_regs
  import puppis_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [7:0]  s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  output cfg_t        cfg,
  input  status_t     status
);
  logic wr_en;

  assign wr_en          = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_awready = wr_en;
  assign s_axil_wready  = wr_en;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;
  assign s_axil_arready = !s_axil_rvalid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg           <= '0;
      s_axil_bvalid <= 1'b0;
    end else begin
      cfg.start <= 1'b0;
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (wr_en) begin
        s_axil_bvalid <= 1'b1;
        if (s_axil_awaddr >= 8'h40) begin
          int l;
          l = int'(s_axil_awaddr[7:4]) - 4;   // 0x40 + 16*l
          if (l < MAX_LAYERS) begin
            unique case (s_axil_awaddr[3:2])
              2'd0: cfg.nbox[l]       <= s_axil_wdata[15:0];
              2'd1: cfg.conf_addr[l]  <= s_axil_wdata;
              2'd2: cfg.loc_addr[l]   <= s_axil_wdata;
              2'd3: cfg.eclut_addr[l] <= s_axil_wdata;
              default: ;
            endcase
          end
        end else begin
          unique case (s_axil_awaddr[5:2])
            4'h0: begin cfg.start <= s_axil_wdata[0]; cfg.auto_en <= s_axil_wdata[1]; end
            4'h2: cfg.num_classes <= s_axil_wdata[CLS_W:0];
            4'h3: cfg.num_layers  <= s_axil_wdata[3:0];
            4'h4: cfg.anchor_addr <= s_axil_wdata;
            4'h5: cfg.blut_addr   <= s_axil_wdata;
            4'h6: cfg.score_addr  <= s_axil_wdata;
            4'h7: cfg.result_addr <= s_axil_wdata;
            4'h8: {cfg.var_y, cfg.var_x} <= s_axil_wdata;
            4'h9: {cfg.var_h, cfg.var_w} <= s_axil_wdata;
            4'hA: begin cfg.sh1 <= s_axil_wdata[4:0]; cfg.sh2 <= s_axil_wdata[12:8]; end
            4'hB: cfg.tval  <= s_axil_wdata[15:0];
            4'hC: cfg.tover <= s_axil_wdata[15:0];
            4'hD: cfg.topk  <= s_axil_wdata[7:0];
            4'hE: cfg.cls_start <= s_axil_wdata[CLS_W:0];
            default: ;
          endcase
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (s_axil_arvalid && s_axil_arready) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= '0;
        if (s_axil_araddr >= 8'h40) begin
          int l;
          l = int'(s_axil_araddr[7:4]) - 4;   // 0x40 + 16*l
          if (l < MAX_LAYERS) begin
            unique case (s_axil_araddr[3:2])
              2'd0: s_axil_rdata <= {16'h0, cfg.nbox[l]};
              2'd1: s_axil_rdata <= cfg.conf_addr[l];
              2'd2: s_axil_rdata <= cfg.loc_addr[l];
              2'd3: s_axil_rdata <= cfg.eclut_addr[l];
              default: ;
            endcase
          end
        end else begin
          unique case (s_axil_araddr[5:2])
            4'h0: s_axil_rdata <= {30'h0, cfg.auto_en, 1'b0};
            4'h1: s_axil_rdata <= {status.n_results, 10'h0, status.err, status.overflow,
                                   status.done, status.phase};
            4'h2: s_axil_rdata <= 32'(cfg.num_classes);
            4'h3: s_axil_rdata <= 32'(cfg.num_layers);
            4'h4: s_axil_rdata <= cfg.anchor_addr;
            4'h5: s_axil_rdata <= cfg.blut_addr;
            4'h6: s_axil_rdata <= cfg.score_addr;
            4'h7: s_axil_rdata <= cfg.result_addr;
            4'h8: s_axil_rdata <= {cfg.var_y, cfg.var_x};
            4'h9: s_axil_rdata <= {cfg.var_h, cfg.var_w};
            4'hA: s_axil_rdata <= {19'h0, cfg.sh2, 3'h0, cfg.sh1};
            4'hB: s_axil_rdata <= 32'(cfg.tval);
            4'hC: s_axil_rdata <= 32'(cfg.tover);
            4'hD: s_axil_rdata <= 32'(cfg.topk);
            4'hE: s_axil_rdata <= 32'(cfg.cls_start);
            default: ;
          endcase
        end
      end
    end
  end
endmodule
