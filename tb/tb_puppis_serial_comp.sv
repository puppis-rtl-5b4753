// Unit test of puppis_serial_comp: random words with random input gaps and
// random output back-pressure. In filter mode only words whose low half is
// above the threshold may come out, in order, each tagged with its position
// in the input stream; in pass mode every word comes out. `clear` restarts
// the position count.
module tb_puppis_serial_comp;
  logic clk = 0, rst_n = 0, clear = 0, filter_en = 0;
  logic [15:0] threshold = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [31:0] in_data = 0, out_data;
  logic [15:0] out_idx;
  int checks = 0, failures = 0, passed = 0;
  typedef struct { logic [31:0] d; logic [15:0] i; } ent_t;
  ent_t q [$];
  always #5 clk = ~clk;
  puppis_serial_comp #(.DW(32), .IW(16)) dut (.*);

  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    ent_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected word"); end
    else begin
      e = q.pop_front();
      if (out_data !== e.d || out_idx !== e.i) begin
        failures++; $display("FAIL got %h@%0d exp %h@%0d", out_data, out_idx, e.d, e.i);
      end
    end
  end

  task automatic stream(input bit filt, input int n);
    int pos = 0;
    filter_en = filt; threshold = 16'($urandom_range(0, 16'hFFFF));
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    while (pos < n) begin
      in_valid = ($urandom_range(0, 4) != 0);
      in_data  = $urandom;
      if (pos % 7 == 3) in_data[15:0] = threshold;          // equal: rejected
      if (pos % 7 == 4) in_data[15:0] = threshold + 16'd1;  // just above
      @(posedge clk);
      if (in_valid && in_ready) begin
        if (!filt || in_data[15:0] > threshold) begin q.push_back('{in_data, 16'(pos)}); passed++; end
        pos++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (30) @(negedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL %0d words missing", q.size()); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 6; r++) stream(1, 300);
    stream(0, 200);
    checks++; if (passed < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
