// Divider: pipelined unsigned fixed-point divider.
//
// Computes q = floor(a * 2^15 / b) as an unsigned Q1.15 value, which is the
// form both users need: softmax divides one exponential by the sum of all of
// them, NMS divides the intersection area by the union area, so the quotient
// lies in [0, 1]. Quotients of 2.0 or more, and division by zero, saturate to
// 16'hFFFF. The description gives a pipelined divider of fixed-point numbers;
// the restoring algorithm, one quotient bit per stage, is this design's choice.
//
// Timing: a new division may enter every cycle; the result leaves LAT = 16
// cycles later with its valid bit and the caller's tag, so callers can match
// results to requests.
module puppis_divider #(
  parameter int unsigned NW   = 34,  // operand width
  parameter int unsigned TAGW = 8,
  localparam int unsigned QW  = 16,  // quotient width, Q1.15
  localparam int unsigned LAT = QW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [NW-1:0]   a,
  input  logic [NW-1:0]   b,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_valid,
  output logic [QW-1:0]   q,
  output logic [TAGW-1:0] out_tag
);
  logic [NW:0]     rem_s [LAT];
  logic [NW-1:0]   div_s [LAT];
  logic [QW-1:0]   quo_s [LAT];
  logic            sat_s [LAT];
  logic [TAGW-1:0] tag_s [LAT];
  logic [LAT-1:0]  vld_s;

  always_ff @(posedge clk) begin
    if (!rst_n) vld_s <= '0;
    else        vld_s <= {vld_s[LAT-2:0], in_valid};
  end

  // Stage 0: integer bit of the quotient and the saturation check.
  always_ff @(posedge clk) begin
    div_s[0] <= b;
    tag_s[0] <= in_tag;
    sat_s[0] <= (b == '0) || ({1'b0, a} >= {b, 1'b0});
    if (a >= b) begin
      rem_s[0] <= {1'b0, a - b};
      quo_s[0] <= QW'(1) << (QW - 1);
    end else begin
      rem_s[0] <= {1'b0, a};
      quo_s[0] <= '0;
    end
  end

  // Stages 1..15: one fractional quotient bit each.
  for (genvar s = 1; s < LAT; s++) begin : g_stage
    logic [NW+1:0] shifted;
    assign shifted = {rem_s[s-1], 1'b0};
    always_ff @(posedge clk) begin
      div_s[s] <= div_s[s-1];
      tag_s[s] <= tag_s[s-1];
      sat_s[s] <= sat_s[s-1];
      if (shifted >= {2'b00, div_s[s-1]}) begin
        rem_s[s] <= (NW+1)'(shifted - {2'b00, div_s[s-1]});
        quo_s[s] <= quo_s[s-1] | (QW'(1) << (QW - 1 - s));
      end else begin
        rem_s[s] <= shifted[NW:0];
        quo_s[s] <= quo_s[s-1];
      end
    end
  end

  assign out_valid = vld_s[LAT-1];
  assign q         = sat_s[LAT-1] ? '1 : quo_s[LAT-1];
  assign out_tag   = tag_s[LAT-1];
endmodule
