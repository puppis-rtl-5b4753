// Unit test of puppis_sort (N = 8): lists of random keys (with ties) are
// pushed, sorted and read back; the result must be in descending key order,
// with equal keys in push order, and take at most n*n cycles. Pushing more
// than N entries must set overflow and keep the first N. A list of one entry
// must finish at once.
module tb_puppis_sort;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, start = 0;
  logic [15:0] push_key = 0, push_payload = 0, rd_key, rd_payload;
  logic busy, done, overflow;
  logic [3:0] count, rd_idx = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  puppis_sort #(.N(N), .KW(16), .PW(16)) dut (.*);

  task automatic run(input int n);
    logic [15:0] k [$], p [$];
    int t;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < n; i++) begin
      push = 1; push_key = 16'($urandom_range(0, 5)); push_payload = 16'(i);
      if (i < N) begin k.push_back(push_key); p.push_back(push_payload); end
      @(negedge clk);
    end
    push = 0;
    checks++; if (count != 4'(k.size())) failures++;
    checks++; if (overflow != (n > N)) failures++;
    // reference: stable insertion sort, highest first
    for (int i = 1; i < k.size(); i++) begin
      logic [15:0] tk, tp; int j;
      tk = k[i]; tp = p[i]; j = i;
      while (j > 0 && k[j-1] < tk) begin k[j] = k[j-1]; p[j] = p[j-1]; j--; end
      k[j] = tk; p[j] = tp;
    end
    start = 1; @(negedge clk); start = 0;
    t = 1;
    while (!done) begin @(negedge clk); t++; end
    checks++; if (t > (k.size() * k.size() + 2)) begin failures++; $display("FAIL slow %0d", t); end
    for (int i = 0; i < k.size(); i++) begin
      rd_idx = 4'(i); #1;
      checks++;
      if (rd_key !== k[i] || rd_payload !== p[i]) begin
        failures++; $display("FAIL n=%0d i=%0d got %0d/%0d exp %0d/%0d", n, i, rd_key, rd_payload, k[i], p[i]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(1);
    for (int r = 0; r < 20; r++) run($urandom_range(2, N));
    run(N + 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
