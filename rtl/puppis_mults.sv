// Mults: four-lane pipelined fixed-point multiplier.
//
// Each lane multiplies two signed 16-bit operands; the full 32-bit product
// appears LAT cycles after the operands, together with the lane's valid bit.
// The description gives four lanes, pipelining and equal operand widths; the
// two-stage pipeline (operand register, product register) is this design's
// choice. The lane valid bits are reset; the data registers are not.
module puppis_mults #(
  parameter int unsigned LANES = 4,
  parameter int unsigned W     = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [LANES-1:0]           in_valid,
  input  logic signed [W-1:0]        a [LANES],
  input  logic signed [W-1:0]        b [LANES],
  output logic [LANES-1:0]           out_valid,
  output logic signed [2*W-1:0]      p [LANES]
);
  logic signed [W-1:0] a_q [LANES];
  logic signed [W-1:0] b_q [LANES];
  logic [LANES-1:0]    v_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q       <= '0;
      out_valid <= '0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
    end
    for (int i = 0; i < LANES; i++) begin
      a_q[i] <= a[i];
      b_q[i] <= b[i];
      p[i]   <= a_q[i] * b_q[i];
    end
  end
endmodule
