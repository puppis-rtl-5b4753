// Unit test of puppis_mults: random signed operands on all four lanes every
// cycle; each product must appear exactly two cycles later with its valid bit.
module tb_puppis_mults;
  logic clk = 0, rst_n = 0;
  logic [3:0] in_valid = 0, out_valid;
  logic signed [15:0] a [4], b [4];
  logic signed [31:0] p [4];
  logic signed [31:0] exp_q [$];
  logic [3:0] vexp_q [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  puppis_mults #(.LANES(4), .W(16)) dut (.*);
  initial begin
    for (int i = 0; i < 4; i++) begin a[i] = 0; b[i] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // check what was issued two cycles ago
      if (n >= 2) begin
        logic [3:0] ve;
        ve = vexp_q.pop_front();
        checks++; if (out_valid !== ve) failures++;
        for (int i = 0; i < 4; i++) begin
          logic signed [31:0] e;
          e = exp_q.pop_front();
          checks++; if (p[i] !== e) failures++;
        end
      end
      in_valid = 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        a[i] = 16'($urandom); b[i] = 16'($urandom);
        if (n % 50 == 0) begin a[i] = -16'sd32768; b[i] = -16'sd32768; end
        exp_q.push_back(32'(a[i]) * 32'(b[i]));
      end
      vexp_q.push_back(in_valid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
