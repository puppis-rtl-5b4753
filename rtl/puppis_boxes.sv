// Boxes: decodes one predicted bounding box from the box-modifier layer's
// outputs (Xp, Yp, Wp, Hp), its anchor box (Cxa, Cya, Wa, Ha) and the
// variances (Xv, Yv, Wv, Hv):
//   Cxb = Xp*Wa*Xv + Cxa         Cyb = Yp*Ha*Yv + Cya
//   Wb  = e^(Wp*Wv) * Wa         Hb  = e^(Hp*Hv) * Ha
//   Xmin = Cxb - Wb  Xmax = Cxb + Wb  Ymin = Cyb - Hb  Ymax = Cyb + Hb
// All values are signed 16-bit fixed point. Each 32-bit product from Mults is
// brought back to 16 bits by an arithmetic barrel shift (sh1 after the first
// round of products, sh2 after the second), the amounts being set by software
// to match the chosen formats. e^x comes from a 1024-entry table in Memory 1,
// addressed by the top ten bits of x (x[15:6], two's complement), so the table
// content defines both the input range and the output format; a table that
// stores e^x/2 yields the half-widths that the Xmin..Ymax equations use.
//
// Sequence, one box at a time (registers named as in the published block diagram):
//   load   8 words from the stream into coords and anchor;
//   mult 1 Xp*Wa, Yp*Ha -> inter;  Wp*Wv, Hp*Hv -> exp     (4 lanes at once)
//   lut    exp -> table -> lut (two reads)
//   mult 2 inter*Xv + Cxa, inter*Yv + Cya -> center;  lut*Wa, lut*Ha -> WH
//   rect   center -/+ WH -> rect, offered on the output until taken.
// The sequence and registers follow the description; the width multiplier is
// Wa (and the height multiplier Ha), the usual SSD decoding.
module puppis_boxes
  import puppis_pkg::*;
#(
  parameter logic [11:0] BLUT_BASE = 12'h000
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [VW-1:0]        var_x, var_y, var_w, var_h,
  input  logic [4:0]           sh1, sh2,
  // coords_in / anchor_in stream: Xp, Yp, Wp, Hp, Cxa, Cya, Wa, Ha
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [VW-1:0]        in_data,
  // Mults (muls_out / muls_in)
  output logic [3:0]           m_valid,
  output logic signed [VW-1:0] m_a [4],
  output logic signed [VW-1:0] m_b [4],
  input  logic [3:0]           m_out_valid,
  input  logic signed [2*VW-1:0] m_p [4],
  // exponential table (lut_out / lut_in)
  output logic                 lut_re,
  output logic [11:0]          lut_addr,
  input  logic [DW-1:0]        lut_in,
  // rect_out: {xmin, ymin, xmax, ymax}
  output logic                 rect_valid,
  input  logic                 rect_ready,
  output logic [4*VW-1:0]      rect_out
);
  typedef enum logic [2:0] {B_LOAD, B_M1, B_M1W, B_LUT, B_M2, B_M2W, B_RECT} st_e;
  st_e st;

  logic signed [VW-1:0] coords [4];
  logic signed [VW-1:0] anchor [4];
  logic signed [VW-1:0] inter  [2];
  logic signed [VW-1:0] expr   [2];
  logic signed [VW-1:0] lut    [2];
  logic signed [VW-1:0] center [2];
  logic signed [VW-1:0] wh     [2];
  logic [2:0]           ld_cnt;
  logic [1:0]           lut_cnt;

  function automatic logic signed [VW-1:0] shr(input logic signed [2*VW-1:0] p, input logic [4:0] sh);
    return VW'(p >>> sh);
  endfunction

  assign in_ready = (st == B_LOAD);

  always_comb begin
    m_valid = '0;
    for (int i = 0; i < 4; i++) begin
      m_a[i] = '0;
      m_b[i] = '0;
    end
    if (st == B_M1) begin
      m_valid = 4'hF;
      m_a[0] = coords[0]; m_b[0] = anchor[2];       // Xp * Wa
      m_a[1] = coords[1]; m_b[1] = anchor[3];       // Yp * Ha
      m_a[2] = coords[2]; m_b[2] = var_w;           // Wp * Wv
      m_a[3] = coords[3]; m_b[3] = var_h;           // Hp * Hv
    end else if (st == B_M2) begin
      m_valid = 4'hF;
      m_a[0] = inter[0];  m_b[0] = var_x;           // Xp*Wa * Xv
      m_a[1] = inter[1];  m_b[1] = var_y;           // Yp*Ha * Yv
      m_a[2] = lut[0];    m_b[2] = anchor[2];       // e^(Wp*Wv) * Wa
      m_a[3] = lut[1];    m_b[3] = anchor[3];       // e^(Hp*Hv) * Ha
    end
  end

  assign lut_re   = (st == B_LUT) && (lut_cnt < 2'd2);
  assign lut_addr = BLUT_BASE + 12'(lut_cnt == 2'd0 ? expr[0][15:6] : expr[1][15:6]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st         <= B_LOAD;
      ld_cnt     <= '0;
      lut_cnt    <= '0;
      rect_valid <= 1'b0;
    end else begin
      unique case (st)
        B_LOAD: if (in_valid) begin
          if (ld_cnt < 3'd4) coords[ld_cnt[1:0]] <= in_data;
          else               anchor[ld_cnt[1:0]] <= in_data;
          ld_cnt <= ld_cnt + 1'b1;
          if (ld_cnt == 3'd7) st <= B_M1;
        end
        B_M1: st <= B_M1W;
        B_M1W: if (m_out_valid[0]) begin
          inter[0] <= shr(m_p[0], sh1);
          inter[1] <= shr(m_p[1], sh1);
          expr[0]  <= shr(m_p[2], sh1);
          expr[1]  <= shr(m_p[3], sh1);
          lut_cnt  <= '0;
          st       <= B_LUT;
        end
        B_LUT: begin
          if (lut_cnt < 2'd2) lut_cnt <= lut_cnt + 1'b1;
          if (lut_cnt == 2'd1) lut[0] <= lut_in[VW-1:0];
          if (lut_cnt == 2'd2) begin
            lut[1] <= lut_in[VW-1:0];
            st     <= B_M2;
          end
        end
        B_M2: st <= B_M2W;
        B_M2W: if (m_out_valid[0]) begin
          center[0] <= shr(m_p[0], sh2) + anchor[0];
          center[1] <= shr(m_p[1], sh2) + anchor[1];
          wh[0]     <= shr(m_p[2], sh2);
          wh[1]     <= shr(m_p[3], sh2);
          st        <= B_RECT;
        end
        B_RECT: begin
          if (!rect_valid) begin
            rect_out   <= {center[0] - wh[0], center[1] - wh[1],
                           center[0] + wh[0], center[1] + wh[1]};
            rect_valid <= 1'b1;
          end else if (rect_ready) begin
            rect_valid <= 1'b0;
            ld_cnt     <= '0;
            st         <= B_LOAD;
          end
        end
        default: st <= B_LOAD;
      endcase
    end
  end
endmodule
