// Unit test of puppis_axi_full_ctrl against the behavioural AXI memory with
// random stalls: read commands of random length and start (many crossing a
// 4 KiB boundary, one longer than a burst) must deliver exactly the memory
// words in order under random stream back-pressure; every AR burst is
// checked for at most 16 beats and no 4 KiB crossing. Random single writes
// must land in memory, and rd_busy / wr_busy must drop when done.
module tb_puppis_axi_full_ctrl;
  logic clk = 0, rst_n = 0;
  logic rd_cmd_valid = 0, rd_cmd_ready, rd_valid, rd_ready = 0, rd_busy;
  logic [31:0] rd_cmd_addr = 0, rd_data;
  logic [15:0] rd_cmd_len = 0;
  logic wr_valid = 0, wr_ready, wr_busy, err;
  logic [31:0] wr_addr = 0, wr_data = 0;
  logic [31:0] m_axi_araddr, m_axi_rdata, m_axi_awaddr, m_axi_wdata;
  logic [7:0]  m_axi_arlen, m_axi_awlen;
  logic [2:0]  m_axi_arsize, m_axi_awsize;
  logic [1:0]  m_axi_arburst, m_axi_awburst, m_axi_rresp, m_axi_bresp;
  logic m_axi_arvalid, m_axi_arready, m_axi_rlast, m_axi_rvalid, m_axi_rready;
  logic m_axi_awvalid, m_axi_awready, m_axi_wlast, m_axi_wvalid, m_axi_wready, m_axi_bvalid, m_axi_bready;
  logic [3:0] m_axi_wstrb;
  int checks = 0, failures = 0, bursts = 0;
  always #5 clk = ~clk;

  puppis_axi_full_ctrl #(.AW(32), .DW(32), .LW(16)) dut (.*);
  tb_axi_mem #(.WORDS(16384), .STALL_PCT(25)) u_mem (
    .clk, .rst_n, .araddr(m_axi_araddr), .arlen(m_axi_arlen), .arvalid(m_axi_arvalid),
    .arready(m_axi_arready), .rdata(m_axi_rdata), .rresp(m_axi_rresp), .rlast(m_axi_rlast),
    .rvalid(m_axi_rvalid), .rready(m_axi_rready), .awaddr(m_axi_awaddr), .awvalid(m_axi_awvalid),
    .awready(m_axi_awready), .wdata(m_axi_wdata), .wvalid(m_axi_wvalid), .wready(m_axi_wready),
    .bresp(m_axi_bresp), .bvalid(m_axi_bvalid), .bready(m_axi_bready));

  always @(posedge clk) if (m_axi_arvalid && m_axi_arready) begin
    bursts++;
    checks++;
    if (m_axi_arlen > 15 || ((m_axi_araddr & 32'hFFF) + 4 * (m_axi_arlen + 1) > 32'h1000) ||
        m_axi_arsize != 3'd2 || m_axi_arburst != 2'b01) begin
      failures++; $display("FAIL burst %h len %0d", m_axi_araddr, m_axi_arlen);
    end
  end
  always @(negedge clk) rd_ready <= ($urandom_range(0, 3) != 0);

  task automatic read(input logic [31:0] a, input int n);
    int got = 0, bad = 0;
    @(negedge clk); rd_cmd_valid = 1; rd_cmd_addr = a; rd_cmd_len = 16'(n);
    do @(posedge clk); while (!rd_cmd_ready);
    @(negedge clk); rd_cmd_valid = 0;
    while (got < n) begin
      @(posedge clk);
      if (rd_valid && rd_ready) begin
        if (rd_data !== u_mem.mem[(a >> 2) + got]) bad++;
        got++;
      end
    end
    checks++; if (bad != 0) begin failures++; $display("FAIL read %h x%0d: %0d wrong", a, n, bad); end
    repeat (3) @(negedge clk);
    checks++; if (rd_busy || rd_valid) begin failures++; $display("FAIL busy after read"); end
  endtask

  initial begin
    for (int i = 0; i < 16384; i++) u_mem.mem[i] = $urandom;
    repeat (3) @(negedge clk); rst_n = 1;
    read(32'h0000_0FF0, 40);
    read(32'h0000_1000, 1);
    read(32'h0000_2FFC, 3);
    for (int r = 0; r < 25; r++) read(32'($urandom_range(0, 12000)) << 2, $urandom_range(1, 200));
    // writes
    for (int r = 0; r < 100; r++) begin
      logic [31:0] a, d;
      a = 32'($urandom_range(0, 16383)) << 2; d = $urandom;
      @(negedge clk); wr_valid = 1; wr_addr = a; wr_data = d;
      do @(posedge clk); while (!wr_ready);
      @(negedge clk); wr_valid = 0;
      while (wr_busy) @(negedge clk);
      checks++; if (u_mem.mem[a >> 2] !== d) begin failures++; $display("FAIL write %h", a); end
    end
    checks++; if (err) failures++;
    checks++; if (bursts < 60) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
