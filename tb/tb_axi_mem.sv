// Behavioural AXI4 slave memory for the testbenches (models the system's
// main memory, which is outside the accelerator). Word-addressed array `mem`
// for back-door loading and checking. INCR bursts, one read and one write
// transaction at a time; ready/valid on the slave side are throttled at random
// (STALL_PCT percent of cycles) to exercise back-pressure.
module tb_axi_mem #(
  parameter int unsigned WORDS     = 262144,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready,
  input  logic [31:0] awaddr,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready
);
  logic [31:0] mem [WORDS];
  logic        r_act, w_haveaddr;
  logic [31:0] r_addr, w_addr;
  logic [7:0]  r_left;
  logic        go_r, go_ar, go_aw, go_w;

  assign rresp = 2'b00;
  assign bresp = 2'b00;

  always_ff @(posedge clk) begin
    go_ar <= ($urandom_range(99) >= STALL_PCT);
    go_r  <= ($urandom_range(99) >= STALL_PCT);
    go_aw <= ($urandom_range(99) >= STALL_PCT);
    go_w  <= ($urandom_range(99) >= STALL_PCT);
  end

  assign arready = !r_act && go_ar;
  assign rvalid  = r_act && go_r;
  assign rdata   = mem[(r_addr >> 2) % WORDS];
  assign rlast   = (r_left == 8'd0);
  assign awready = !w_haveaddr && !bvalid && go_aw;
  assign wready  = w_haveaddr && !bvalid && go_w;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_act      <= 1'b0;
      r_addr     <= '0;
      r_left     <= '0;
      w_haveaddr <= 1'b0;
      w_addr     <= '0;
      bvalid     <= 1'b0;
    end else begin
      if (arvalid && arready) begin
        r_act  <= 1'b1;
        r_addr <= araddr;
        r_left <= arlen;
      end else if (rvalid && rready) begin
        r_addr <= r_addr + 32'd4;
        r_left <= r_left - 1'b1;
        if (rlast) r_act <= 1'b0;
      end
      if (awvalid && awready) begin
        w_haveaddr <= 1'b1;
        w_addr     <= awaddr;
      end
      if (wvalid && wready) begin
        mem[(w_addr >> 2) % WORDS] <= wdata;
        w_haveaddr <= 1'b0;
        bvalid     <= 1'b1;
      end
      if (bvalid && bready) bvalid <= 1'b0;
    end
  end
endmodule
