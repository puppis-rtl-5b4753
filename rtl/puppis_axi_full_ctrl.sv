// AXI-full Control: joins a read stream and a write stream into one AXI4
// master port to main memory.
//
// Read side: a command (byte address, number of 32-bit words) is split into
// INCR bursts of at most 16 beats that never cross a 4 KiB boundary; one burst
// is outstanding at a time and the returned words leave on the read stream
// (valid/ready, RREADY follows the stream's ready). `rd_busy` is high from
// the accepted command until its last word has left.
// Write side: each (address, word) accepted on the write stream becomes one
// single-beat write; AW and W are offered together and the next write waits
// for the B response. `wr_busy` is high while a write is outstanding.
// A non-OKAY response sets the sticky `err` flag.
//
// The description gives only the function (two streams combined into one
// AXI-full interface); burst sizes, single-beat writes and one outstanding
// transaction per direction are this design's choices.
module puppis_axi_full_ctrl #(
  parameter int unsigned AW = 32,
  parameter int unsigned DW = 32,
  parameter int unsigned LW = 16   // width of the word count of a read command
) (
  input  logic          clk,
  input  logic          rst_n,
  // read command and stream
  input  logic          rd_cmd_valid,
  output logic          rd_cmd_ready,
  input  logic [AW-1:0] rd_cmd_addr,
  input  logic [LW-1:0] rd_cmd_len,
  output logic          rd_valid,
  input  logic          rd_ready,
  output logic [DW-1:0] rd_data,
  output logic          rd_busy,
  // write stream
  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  output logic          wr_busy,
  output logic          err,
  // AXI4 master
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
  typedef enum logic [1:0] {R_IDLE, R_AR, R_DATA} rd_state_e;
  typedef enum logic [1:0] {W_IDLE, W_REQ, W_RESP} wr_state_e;

  rd_state_e     rs;
  wr_state_e     ws;
  logic [AW-1:0] raddr;
  logic [LW-1:0] rrem;
  logic [4:0]    blen;
  logic [10:0]   to_4k;
  logic          aw_done, w_done;

  // ---------------- read side ----------------
  always_comb begin
    to_4k = 11'((13'h1000 - {1'b0, raddr[11:0]}) >> 2);
    blen  = 5'd16;
    if (rrem < LW'(blen))  blen = 5'(rrem);
    if (to_4k < 11'(blen)) blen = 5'(to_4k);
  end

  assign rd_cmd_ready  = (rs == R_IDLE);
  assign rd_busy       = (rs != R_IDLE);
  assign m_axi_araddr  = raddr;
  assign m_axi_arlen   = 8'(blen - 1'b1);
  assign m_axi_arsize  = 3'($clog2(DW / 8));
  assign m_axi_arburst = 2'b01;
  assign m_axi_arvalid = (rs == R_AR);
  assign m_axi_rready  = (rs == R_DATA) && rd_ready;
  assign rd_valid      = (rs == R_DATA) && m_axi_rvalid;
  assign rd_data       = m_axi_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rs    <= R_IDLE;
      raddr <= '0;
      rrem  <= '0;
    end else begin
      unique case (rs)
        R_IDLE: if (rd_cmd_valid && rd_cmd_len != '0) begin
          raddr <= rd_cmd_addr;
          rrem  <= rd_cmd_len;
          rs    <= R_AR;
        end
        R_AR: if (m_axi_arready) begin
          raddr <= raddr + AW'({blen, 2'b00});
          rrem  <= rrem - LW'(blen);
          rs    <= R_DATA;
        end
        R_DATA: if (m_axi_rvalid && m_axi_rready && m_axi_rlast)
          rs <= (rrem == '0) ? R_IDLE : R_AR;
        default: rs <= R_IDLE;
      endcase
    end
  end

  // ---------------- write side ----------------
  assign wr_ready      = (ws == W_IDLE);
  assign wr_busy       = (ws != W_IDLE);
  assign m_axi_awlen   = 8'd0;
  assign m_axi_awsize  = 3'($clog2(DW / 8));
  assign m_axi_awburst = 2'b01;
  assign m_axi_wstrb   = '1;
  assign m_axi_wlast   = 1'b1;
  assign m_axi_awvalid = (ws == W_REQ) && !aw_done;
  assign m_axi_wvalid  = (ws == W_REQ) && !w_done;
  assign m_axi_bready  = (ws == W_RESP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ws           <= W_IDLE;
      aw_done      <= 1'b0;
      w_done       <= 1'b0;
      m_axi_awaddr <= '0;
      m_axi_wdata  <= '0;
      err          <= 1'b0;
    end else begin
      unique case (ws)
        W_IDLE: if (wr_valid) begin
          m_axi_awaddr <= wr_addr;
          m_axi_wdata  <= wr_data;
          aw_done      <= 1'b0;
          w_done       <= 1'b0;
          ws           <= W_REQ;
        end
        W_REQ: begin
          if (m_axi_awready) aw_done <= 1'b1;
          if (m_axi_wready)  w_done  <= 1'b1;
          if ((aw_done || m_axi_awready) && (w_done || m_axi_wready)) ws <= W_RESP;
        end
        W_RESP: if (m_axi_bvalid) begin
          if (m_axi_bresp != 2'b00) err <= 1'b1;
          ws <= W_IDLE;
        end
        default: ws <= W_IDLE;
      endcase
      if (m_axi_rvalid && m_axi_rready && m_axi_rresp != 2'b00) err <= 1'b1;
    end
  end

  // AXI rule: a valid address stays stable until accepted.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_arvalid && !m_axi_arready |=> m_axi_arvalid && $stable(m_axi_araddr));
endmodule
