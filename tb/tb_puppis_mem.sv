// Unit test of puppis_mem: random writes, then reads checked against a
// shadow copy, including the one-cycle read latency and a read of an address
// written in the same cycle (old data returned).
module tb_puppis_mem;
  logic clk = 0, we = 0, re = 0;
  logic [11:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [31:0] shadow [4096];
  always #5 clk = ~clk;
  puppis_mem #(.DEPTH(4096), .WIDTH(32)) dut (.*);
  initial begin
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); we = 1; waddr = 12'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      int a;
      a = $urandom_range(0, 4095);
      @(negedge clk); re = 1; raddr = 12'(a);
      we = 1; waddr = 12'(a); wdata = $urandom;
      @(negedge clk); re = 0; we = 0;
      checks++; if (rdata !== shadow[a]) failures++;
      shadow[a] = wdata;
      re = 1; raddr = 12'(a);
      @(negedge clk); re = 0;
      checks++; if (rdata !== shadow[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
