// Softmax: normalised class scores n_k = e^S_k / sum_i e^S_i for one box at a
// time, computed with a mix of floating point (for the comparison that picks
// the number format) and 16-bit fixed point (for the sum and the division).
//
// Stage 1 (per class): the signed 16-bit confidence S_k arrives on the conf
//   stream; conf >> 4 addresses the 4096-entry ECLUT held in Memory 0, which
//   returns e^S_k as an IEEE-754 float. The float goes to the float area of the
//   intermediate memory and its exponent is compared with the running maximum
//   in exp_max_reg.
// Stage 2 (per class): each float is read back and converted to unsigned
//   16-bit fixed point in the format chosen by the maximum exponent: the
//   largest value lands in [2^15, 2^16), i.e. value << (142 - emax). The
//   fixed values go to the fixed area of the intermediate memory and are
//   summed; when the sum overflows 16 bits it is halved and the reduce count
//   (fix_sft) grows, so the sum stays in a coarser format.
// Stage 3 (per class): each fixed value is shifted right by the reduce count,
//   so it is in the sum's format, and divided by the sum. Quotients (Q1.15)
//   return from the shared pipelined Divider into a 32-entry output queue and
//   leave on the score stream with their class index.
//
// The three stages and the ECLUT/float/fixed scheme follow the description.
// This design's choices: the stages run one box after another rather than
// overlapped; the sum adds each value already shifted by the current reduce
// count (so every term is in the same format); stage 3 of a box starts only
// after the previous box's scores have left the queue.
// Memory 1 map used here: float area at FLT_BASE, fixed area at FIX_BASE.
module puppis_softmax
  import puppis_pkg::*;
#(
  parameter logic [11:0] FLT_BASE = 12'h400,
  parameter logic [11:0] FIX_BASE = 12'h440,
  parameter int unsigned QDEPTH   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CLS_W:0]    num_classes,
  // confidence stream (cnf_in)
  input  logic              cnf_valid,
  output logic              cnf_ready,
  input  logic [VW-1:0]     cnf_in,
  // ECLUT in Memory 0 (eclut_out / eclut_in)
  output logic              eclut_re,
  output logic [11:0]       eclut_addr,
  input  logic [DW-1:0]     eclut_in,
  // intermediate memory (float_mem_out, float_mem_in, fix_mem_out, fix_mem_in)
  output mem_req_t          imem,
  input  logic [DW-1:0]     imem_rdata,
  // shared divider
  output logic              div_valid,
  output logic [VW-1:0]     div_a,
  output logic [VW-1:0]     div_b,
  output logic [CLS_W-1:0]  div_tag,
  input  logic              div_in_valid,
  input  logic [VW-1:0]     div_in,
  input  logic [CLS_W-1:0]  div_in_tag,
  // score stream (score_out)
  output logic              score_valid,
  input  logic              score_ready,
  output logic [VW-1:0]     score_out,
  output logic [CLS_W-1:0]  score_cls,
  output logic              busy
);
  typedef enum logic [1:0] {ST1, ST2, ST3_WAIT, ST3} st_e;
  st_e st;

  logic [CLS_W:0]   n_cnt;      // requests issued in the current stage
  logic             v_d;        // a memory read returns this cycle
  logic [CLS_W-1:0] c_d;        // class of that read
  logic [7:0]       exp_max_reg;
  logic [VW-1:0]    fix_sum;
  logic [4:0]       fix_sft;
  logic [CLS_W:0]   inflight;

  // output queue
  logic [VW+CLS_W-1:0] q_mem [QDEPTH];
  logic [$clog2(QDEPTH)-1:0] q_wp, q_rp;
  logic [$clog2(QDEPTH):0]   q_cnt;

  // float -> fixed in the format fixed by the maximum exponent
  function automatic logic [VW-1:0] float2fix(input logic [31:0] f, input logic [7:0] emax);
    logic [8:0] sh;
    logic [23:0] mant;
    if (f[30:23] == 8'd0) return '0;
    mant = {1'b1, f[22:0]};
    sh   = 9'd8 + {1'b0, emax} - {1'b0, f[30:23]};
    if (sh >= 9'd24) return '0;
    return VW'(mant >> sh);
  endfunction

  logic          accept;
  logic [VW-1:0] fix_val;
  logic [VW:0]   sum_next;

  assign cnf_ready  = (st == ST1) && (n_cnt < num_classes);
  assign accept     = cnf_valid && cnf_ready;
  assign eclut_re   = accept;
  assign eclut_addr = cnf_in[15:4];
  assign fix_val    = float2fix(imem_rdata, exp_max_reg);
  assign sum_next   = {1'b0, fix_sum} + {1'b0, fix_val >> fix_sft};

  always_comb begin
    imem = '0;
    unique case (st)
      ST1: begin
        imem.we    = v_d;
        imem.waddr = FLT_BASE + 12'(c_d);
        imem.wdata = eclut_in;
      end
      ST2: begin
        imem.re    = (n_cnt < num_classes);
        imem.raddr = FLT_BASE + 12'(n_cnt);
        imem.we    = v_d;
        imem.waddr = FIX_BASE + 12'(c_d);
        imem.wdata = DW'(fix_val);
      end
      ST3: begin
        imem.re    = (n_cnt < num_classes);
        imem.raddr = FIX_BASE + 12'(n_cnt);
      end
      default: ;
    endcase
  end

  assign div_valid = (st == ST3) && v_d;
  assign div_a     = imem_rdata[VW-1:0] >> fix_sft;
  assign div_b     = fix_sum;
  assign div_tag   = c_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st          <= ST1;
      n_cnt       <= '0;
      v_d         <= 1'b0;
      c_d         <= '0;
      exp_max_reg <= '0;
      fix_sum     <= '0;
      fix_sft     <= '0;
    end else begin
      v_d <= 1'b0;
      unique case (st)
        ST1: begin
          if (accept) begin
            v_d   <= 1'b1;
            c_d   <= CLS_W'(n_cnt);
            n_cnt <= n_cnt + 1'b1;
          end
          if (v_d) begin
            // fexp_cmp: keep the largest exponent seen
            if (eclut_in[30:23] > exp_max_reg) exp_max_reg <= eclut_in[30:23];
            if ({1'b0, c_d} == num_classes - 1'b1) begin
              st    <= ST2;
              n_cnt <= '0;
            end
          end
        end
        ST2: begin
          if (n_cnt < num_classes) begin
            v_d   <= 1'b1;
            c_d   <= CLS_W'(n_cnt);
            n_cnt <= n_cnt + 1'b1;
          end
          if (v_d) begin
            if (sum_next[VW]) begin
              fix_sum <= sum_next[VW:1];
              fix_sft <= fix_sft + 1'b1;
            end else begin
              fix_sum <= sum_next[VW-1:0];
            end
            if ({1'b0, c_d} == num_classes - 1'b1) begin
              st    <= ST3_WAIT;
              n_cnt <= '0;
            end
          end
        end
        ST3_WAIT: if (q_cnt == '0 && inflight == '0) st <= ST3;
        ST3: begin
          if (n_cnt < num_classes) begin
            v_d   <= 1'b1;
            c_d   <= CLS_W'(n_cnt);
            n_cnt <= n_cnt + 1'b1;
          end
          if (v_d && {1'b0, c_d} == num_classes - 1'b1) begin
            st          <= ST1;
            n_cnt       <= '0;
            exp_max_reg <= '0;
            // fix_sum and fix_sft stay until the last division has been issued
          end
        end
        default: st <= ST1;
      endcase
      if (st == ST1 && n_cnt == '0 && !v_d) begin
        fix_sum <= '0;
        fix_sft <= '0;
      end
    end
  end

  // divisions in flight and the output queue
  logic q_push, q_pop;
  assign q_push      = div_in_valid;
  assign q_pop       = score_valid && score_ready;
  assign score_valid = (q_cnt != '0);
  assign {score_cls, score_out} = q_mem[q_rp];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_wp     <= '0;
      q_rp     <= '0;
      q_cnt    <= '0;
      inflight <= '0;
    end else begin
      if (q_push) begin
        q_mem[q_wp] <= {div_in_tag, div_in};
        q_wp        <= q_wp + 1'b1;
      end
      if (q_pop) q_rp <= q_rp + 1'b1;
      q_cnt    <= q_cnt + $bits(q_cnt)'(q_push) - $bits(q_cnt)'(q_pop);
      inflight <= inflight + $bits(inflight)'(div_valid) - $bits(inflight)'(div_in_valid);
    end
  end

  assign busy = (st != ST1) || (n_cnt != '0) || v_d || (q_cnt != '0) || (inflight != '0);
endmodule
