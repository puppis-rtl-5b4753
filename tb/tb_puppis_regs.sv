// Unit test of puppis_regs: writes every register of the map over AXI-Lite
// (with the address and data phases offered in different orders), reads each
// back, checks the configuration outputs field by field, the self-clearing
// start bit, the read-only status word and that unmapped addresses read zero.
module tb_puppis_regs;
  import puppis_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] s_axil_awaddr = 0, s_axil_araddr = 0;
  logic s_axil_awvalid = 0, s_axil_wvalid = 0, s_axil_bready = 0, s_axil_arvalid = 0, s_axil_rready = 0;
  logic s_axil_awready, s_axil_wready, s_axil_bvalid, s_axil_arready, s_axil_rvalid;
  logic [31:0] s_axil_wdata = 0, s_axil_rdata;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  cfg_t cfg;
  status_t status;
  int checks = 0, failures = 0, starts = 0;
  always #5 clk = ~clk;
  puppis_regs dut (.*);
  always @(posedge clk) if (rst_n && cfg.start) starts++;

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    int mode = $urandom_range(0, 2);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_wdata = d;
    s_axil_awvalid = (mode != 2); s_axil_wvalid = (mode != 1);
    @(negedge clk);
    s_axil_awvalid = 1; s_axil_wvalid = 1; s_axil_bready = 1;
    while (!(s_axil_awvalid && s_axil_awready) && !s_axil_bvalid) begin @(negedge clk); end
    while (!s_axil_bvalid) @(negedge clk);
    s_axil_awvalid = 0; s_axil_wvalid = 0;
    checks++; if (s_axil_bresp != 2'b00) failures++;
    @(negedge clk); s_axil_bready = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); s_axil_araddr = a; s_axil_arvalid = 1; s_axil_rready = 1;
    while (!s_axil_rvalid) begin
      @(negedge clk);
      if (s_axil_arready === 1'b1 || s_axil_rvalid) s_axil_arvalid = 0;
    end
    s_axil_arvalid = 0;
    d = s_axil_rdata;
    @(negedge clk); s_axil_rready = 0;
  endtask

  task automatic chk(input logic [7:0] a, input logic [31:0] e);
    logic [31:0] d;
    rd(a, d);
    checks++;
    if (d !== e) begin failures++; $display("FAIL read %h = %h, expected %h", a, d, e); end
  endtask

  logic [31:0] v [int];
  initial begin
    status = '{phase: PH_NMS, done: 1'b1, overflow: 1'b0, err: 1'b1, n_results: 16'd1234};
    repeat (3) @(negedge clk); rst_n = 1;
    v[8'h08] = 21;  v[8'h0C] = 6; v[8'h10] = 32'h1000_0000; v[8'h14] = 32'h1100_0040;
    v[8'h18] = 32'h2000_0000; v[8'h1C] = 32'h3000_0000; v[8'h20] = 32'h0CCD_0CCD;
    v[8'h24] = 32'h1999_1999; v[8'h28] = 32'h0000_0C0C; v[8'h2C] = 1638; v[8'h30] = 14746;
    v[8'h34] = 100; v[8'h38] = 1;
    for (int l = 0; l < 6; l++) begin
      v[8'h40 + 16*l] = 1000 + l; v[8'h44 + 16*l] = 32'h4000_0000 + l;
      v[8'h48 + 16*l] = 32'h5000_0000 + l; v[8'h4C + 16*l] = 32'h6000_0000 + l;
    end
    foreach (v[a]) wr(8'(a), v[a]);
    foreach (v[a]) chk(8'(a), v[a]);
    // configuration outputs
    checks++; if (cfg.num_classes != 21 || cfg.num_layers != 6 || cfg.tval != 1638 ||
                  cfg.tover != 14746 || cfg.topk != 100 || cfg.cls_start != 1 ||
                  cfg.sh1 != 12 || cfg.sh2 != 12 || cfg.var_x != 16'h0CCD || cfg.var_h != 16'h1999 ||
                  cfg.anchor_addr != 32'h1000_0000 || cfg.blut_addr != 32'h1100_0040 ||
                  cfg.score_addr != 32'h2000_0000 || cfg.result_addr != 32'h3000_0000) begin
      failures++; $display("FAIL cfg fields");
    end
    for (int l = 0; l < 6; l++) begin
      checks++;
      if (cfg.nbox[l] != 16'(1000 + l) || cfg.conf_addr[l] != 32'h4000_0000 + l ||
          cfg.loc_addr[l] != 32'h5000_0000 + l || cfg.eclut_addr[l] != 32'h6000_0000 + l) begin
        failures++; $display("FAIL layer %0d", l);
      end
    end
    // start pulses for one cycle, auto bit sticks
    wr(8'h00, 32'h3);
    repeat (3) @(negedge clk);
    checks++; if (starts != 1 || cfg.start || !cfg.auto_en) begin failures++; $display("FAIL start %0d %0d %0d", starts, cfg.start, cfg.auto_en); end
    chk(8'h00, 32'h2);
    chk(8'h04, {16'd1234, 10'h0, 1'b1, 1'b0, 1'b1, 3'd3});
    wr(8'h04, 32'hFFFF_FFFF);     // read only
    chk(8'h04, {16'd1234, 10'h0, 1'b1, 1'b0, 1'b1, 3'd3});
    chk(8'h3C, 0);
    chk(8'hA0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
