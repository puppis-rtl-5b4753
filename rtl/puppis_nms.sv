// NMS: overlap test of one box against the current best box of a class.
//
// A box entered with `in_first` becomes the reference box (gt_ind of the NMS
// loop): its corners go to xy_first and, once Mults returns its area, that
// area goes to area_first; it produces no output. Every later box goes
// through
//   delta   : its side lengths (Xmax-Xmin, Ymax-Ymin), clamped at zero;
//   cmp_sub : the intersection sides min(Xmax)-max(Xmin), min(Ymax)-max(Ymin)
//             against xy_first, clamped at zero (no overlap);
//   Mults   : lane 0 its area (area_cnt), lane 1 the intersection A_i (area_itc);
//   div0/div1 : A_i and the union A_u = area_cnt + area_first - A_i;
//   Divider : O = A_i / A_u in Q1.15;
//   keep    : keep_out = O < TOVER, with the box's score and tag (res).
// One box may enter per cycle; a result leaves MUL_LAT + 2 + the divider's
// latency cycles later, in entry order. A reference box must enter before the
// boxes compared with it, and its area reaches area_first before they need it.
//
// Datapath and register names follow the description. The keep rule follows
// the NMS algorithm's "keep the boxes whose overlap is less than TOVER"; the
// clamping at zero is this design's addition.
module puppis_nms
  import puppis_pkg::*;
#(
  parameter int unsigned MUL_LAT = 2,
  parameter int unsigned TAGW    = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [VW-1:0]          tover,          // iou_trash_in
  input  logic                   in_valid,
  input  logic                   in_first,
  input  logic signed [VW-1:0]   x_min_in, y_min_in, x_max_in, y_max_in,
  input  logic [VW-1:0]          score_in,       // scores_in
  input  logic [TAGW-1:0]        tag_in,         // index_in
  // Mults (muls_out / muls_in), lanes 0 and 1
  output logic [1:0]             m_valid,
  output logic signed [VW-1:0]   m_a [2],
  output logic signed [VW-1:0]   m_b [2],
  input  logic signed [2*VW-1:0] m_p [2],
  // Divider (div0_out, div1_out / div_in); its tag carries {score, tag}
  output logic                   div_valid,
  output logic [31:0]            div0_out,
  output logic [31:0]            div1_out,
  output logic [VW+TAGW-1:0]     div_tag,
  input  logic                   div_in_valid,
  input  logic [VW-1:0]          div_in,
  input  logic [VW+TAGW-1:0]     div_in_tag,
  // result
  output logic                   keep_valid,
  output logic                   keep_out,
  output logic [VW-1:0]          res_score,
  output logic [TAGW-1:0]        res_tag
);
  typedef logic signed [VW-1:0] sv_t;

  sv_t xf_min, yf_min, xf_max, yf_max;                 // xy_first
  sv_t dx_q, dy_q, ix_q, iy_q;                          // delta, cmp_sub
  logic a_valid, a_first;
  logic [VW+TAGW-1:0] a_side;
  logic [MUL_LAT-1:0] m_vld_d, m_first_d;
  logic [VW+TAGW-1:0] m_side_d [MUL_LAT];
  logic [31:0] area_first;

  function automatic sv_t pos(input logic signed [VW:0] v);
    if (v < 0) return '0;
    if (v > (VW+1)'(2**(VW-1) - 1)) return sv_t'(2**(VW-1) - 1);
    return sv_t'(v);
  endfunction

  function automatic sv_t smax(input sv_t a, input sv_t b); return (a > b) ? a : b; endfunction
  function automatic sv_t smin(input sv_t a, input sv_t b); return (a < b) ? a : b; endfunction

  // stage A: delta and cmp_sub
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_valid <= 1'b0;
      a_first <= 1'b0;
    end else begin
      a_valid <= in_valid;
      a_first <= in_first;
    end
    a_side <= {score_in, tag_in};
    dx_q <= pos((VW+1)'(x_max_in) - (VW+1)'(x_min_in));
    dy_q <= pos((VW+1)'(y_max_in) - (VW+1)'(y_min_in));
    ix_q <= pos((VW+1)'(smin(x_max_in, xf_max)) - (VW+1)'(smax(x_min_in, xf_min)));
    iy_q <= pos((VW+1)'(smin(y_max_in, yf_max)) - (VW+1)'(smax(y_min_in, yf_min)));
    if (in_valid && in_first) begin
      xf_min <= x_min_in;
      yf_min <= y_min_in;
      xf_max <= x_max_in;
      yf_max <= y_max_in;
    end
  end

  // stage B: multiplications, side band delayed alongside
  assign m_valid = {a_valid, a_valid};
  assign m_a[0]  = dx_q;
  assign m_b[0]  = dy_q;
  assign m_a[1]  = ix_q;
  assign m_b[1]  = iy_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_vld_d   <= '0;
      m_first_d <= '0;
    end else begin
      m_vld_d   <= {m_vld_d[MUL_LAT-2:0], a_valid};
      m_first_d <= {m_first_d[MUL_LAT-2:0], a_first};
    end
    m_side_d[0] <= a_side;
    for (int i = 1; i < MUL_LAT; i++) m_side_d[i] <= m_side_d[i-1];
  end

  // stage C: area_first / area_cnt / area_itc -> div0, div1
  logic mv, mf;
  assign mv = m_vld_d[MUL_LAT-1];
  assign mf = m_first_d[MUL_LAT-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_valid  <= 1'b0;
      area_first <= '0;
    end else begin
      div_valid <= mv && !mf;
      if (mv && mf) area_first <= 32'(m_p[0]);
    end
    div0_out <= 32'(m_p[1]);
    div1_out <= 32'(m_p[0]) + area_first - 32'(m_p[1]);
    div_tag  <= m_side_d[MUL_LAT-1];
  end

  // stage D: compare with the threshold
  always_ff @(posedge clk) begin
    if (!rst_n) keep_valid <= 1'b0;
    else        keep_valid <= div_in_valid;
    keep_out  <= div_in < tover;
    {res_score, res_tag} <= div_in_tag;
  end
endmodule
