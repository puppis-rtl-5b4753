// Serial Comp: threshold filter on the main-memory read stream.
//
// Sits between the read side of the AXI-full Control and the Arbiter. In
// filter mode it passes on only those words whose 16-bit value (the low half,
// an unsigned Q1.15 score) is strictly greater than `threshold`, and tags each
// passed word with its position in the stream, so the receiver knows which box
// the score belongs to. In pass mode every word goes through, still tagged.
// The filter and the pass-through are the description's; the tagging and the
// one-register pipeline are this design's choices.
//
// Streams use valid/ready: a word moves when both are high. `clear` restarts
// the position count at zero; the output register adds one cycle of latency.
module puppis_serial_comp #(
  parameter int unsigned DW = 32,
  parameter int unsigned IW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          filter_en,
  input  logic [15:0]   threshold,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data,
  output logic [IW-1:0] out_idx
);
  logic [IW-1:0] pos;
  logic          pass;

  assign in_ready = !out_valid || out_ready;
  assign pass     = !filter_en || (in_data[15:0] > threshold);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      pos       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_idx   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        pos <= pos + 1'b1;
        if (pass) begin
          out_valid <= 1'b1;
          out_data  <= in_data;
          out_idx   <= pos;
        end
      end
    end
  end
endmodule
