// Internal caching memory (Memory 0 / Memory 1 of the accelerator).
//
// A simple dual-port RAM: one write port and one read port, both synchronous
// to clk. A read issued with `re` returns `rdata` on the next cycle. The
// description gives the two memories' role (tables, intermediate results,
// decoded boxes, NMS results) but not their organisation; the depth of 4096
// 32-bit words is this design's choice, sized to hold one 4096-sample ECLUT or
// up to 2048 decoded boxes. Contents are not reset.
module puppis_mem #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW_L = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW_L-1:0]  waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW_L-1:0]  raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] ram [DEPTH];

  always_ff @(posedge clk) begin
    if (we) ram[waddr] <= wdata;
    if (re) rdata <= ram[raddr];
  end
endmodule
