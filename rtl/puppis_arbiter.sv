// Arbiter: the data-routing unit between the memory streams, the calculation
// modules and the two internal memories.
//
// Purely combinational multiplexers set by Control:
//   read stream (from Serial Comp) -> Memory 0 (ECLUT load, word i to address
//     i), Memory 1 (box LUT load), Softmax confidences, Boxes inputs or the
//     Sort input, by `rd_route`;
//   write stream (to AXI-full Control) <- Softmax scores (address from
//     Control) or Control's own words (final detections), by `wr_route`;
//   Memory 0 port <- table load plus Softmax's ECLUT reads in the softmax
//     phase, Control otherwise;
//   Memory 1 port <- Softmax's intermediate values in the softmax phase, box
//     LUT load plus Boxes' table reads in the boxes phase, Control otherwise;
//   Sort input <- the stream (NMS candidates) or Control (final sort).
// The description gives the Arbiter's role; this routing set is the one the
// rest of this design needs. A route that is not selected sees valid low, and
// a stream with no route selected is not accepted (ready low).
module puppis_arbiter
  import puppis_pkg::*;
(
  input  phase_e         phase,
  input  rd_route_e      rd_route,
  input  wr_route_e      wr_route,
  // read stream from Serial Comp
  input  logic           sc_valid,
  output logic           sc_ready,
  input  logic [DW-1:0]  sc_data,
  input  logic [15:0]    sc_idx,
  // Softmax
  output logic           sm_cnf_valid,
  input  logic           sm_cnf_ready,
  output logic [VW-1:0]  sm_cnf_data,
  input  logic           sm_eclut_re,
  input  logic [11:0]    sm_eclut_addr,
  input  mem_req_t       sm_imem,
  input  logic           sm_score_valid,
  output logic           sm_score_ready,
  input  logic [VW-1:0]  sm_score,
  input  logic [AW-1:0]  sm_wr_addr,
  // Boxes
  output logic           bx_in_valid,
  input  logic           bx_in_ready,
  output logic [VW-1:0]  bx_in_data,
  input  logic           bx_lut_re,
  input  logic [11:0]    bx_lut_addr,
  // Sort input
  input  logic           ctl_sort_push,
  input  logic [VW-1:0]  ctl_sort_key,
  input  logic [15:0]    ctl_sort_payload,
  output logic           sort_push,
  output logic [VW-1:0]  sort_key,
  output logic [15:0]    sort_payload,
  // Control's own memory ports and write words
  input  mem_req_t       ctl_mem0,
  input  mem_req_t       ctl_mem1,
  input  logic           ctl_wr_valid,
  output logic           ctl_wr_ready,
  input  logic [AW-1:0]  ctl_wr_addr,
  input  logic [DW-1:0]  ctl_wr_data,
  // to the memories
  output mem_req_t       mem0,
  output mem_req_t       mem1,
  // write stream to AXI-full Control
  output logic           wr_valid,
  input  logic           wr_ready,
  output logic [AW-1:0]  wr_addr,
  output logic [DW-1:0]  wr_data
);
  logic sc_fire;
  assign sc_fire = sc_valid && sc_ready;

  // read stream
  always_comb begin
    sc_ready     = 1'b0;
    sm_cnf_valid = 1'b0;
    bx_in_valid  = 1'b0;
    unique case (rd_route)
      RD_MEM0, RD_MEM1, RD_SORT: sc_ready = 1'b1;
      RD_SOFTMAX: begin sm_cnf_valid = sc_valid; sc_ready = sm_cnf_ready; end
      RD_BOXES:   begin bx_in_valid  = sc_valid; sc_ready = bx_in_ready;  end
      default: ;
    endcase
  end
  assign sm_cnf_data = sc_data[VW-1:0];
  assign bx_in_data  = sc_data[VW-1:0];

  // sort input
  always_comb begin
    if (rd_route == RD_SORT) begin
      sort_push    = sc_fire;
      sort_key     = sc_data[VW-1:0];
      sort_payload = sc_idx;
    end else begin
      sort_push    = ctl_sort_push;
      sort_key     = ctl_sort_key;
      sort_payload = ctl_sort_payload;
    end
  end

  // memories
  always_comb begin
    mem0 = ctl_mem0;
    mem1 = ctl_mem1;
    unique case (phase)
      PH_SOFTMAX: begin
        mem0       = '0;
        mem0.we    = sc_fire && (rd_route == RD_MEM0);
        mem0.waddr = sc_idx[11:0];
        mem0.wdata = sc_data;
        mem0.re    = sm_eclut_re;
        mem0.raddr = sm_eclut_addr;
        mem1       = sm_imem;
      end
      PH_BOXES: begin
        mem1       = '0;
        mem1.we    = sc_fire && (rd_route == RD_MEM1);
        mem1.waddr = sc_idx[11:0];
        mem1.wdata = sc_data;
        mem1.re    = bx_lut_re;
        mem1.raddr = bx_lut_addr;
      end
      default: ;
    endcase
  end

  // write stream
  always_comb begin
    wr_valid       = 1'b0;
    wr_addr        = '0;
    wr_data        = '0;
    sm_score_ready = 1'b0;
    ctl_wr_ready   = 1'b0;
    unique case (wr_route)
      WR_SOFTMAX: begin
        wr_valid       = sm_score_valid;
        wr_addr        = sm_wr_addr;
        wr_data        = DW'(sm_score);
        sm_score_ready = wr_ready;
      end
      WR_CTRL: begin
        wr_valid     = ctl_wr_valid;
        wr_addr      = ctl_wr_addr;
        wr_data      = ctl_wr_data;
        ctl_wr_ready = wr_ready;
      end
      default: ;
    endcase
  end
endmodule
