// Unit test of puppis_divider: a new random division every cycle (ratios
// below one, near one, above two and division by zero); each quotient must
// equal floor(a*2^15/b), or 16'hFFFF when that is 2.0 or more, and appear
// exactly 16 cycles after its operands with its tag.
module tb_puppis_divider;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] a = 0, b = 0;
  logic [7:0] in_tag = 0, out_tag;
  logic [15:0] q;
  int checks = 0, failures = 0;
  longint cycle = 0;
  typedef struct { logic [15:0] q; logic [7:0] tag; longint t; } exp_t;
  exp_t exq [$];
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  puppis_divider #(.NW(32), .TAGW(8)) dut (.*);

  function automatic logic [15:0] ref_q(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] r;
    if (y == 0 || {32'h0, x} >= {31'h0, y, 1'b0}) return 16'hFFFF;
    r = ({32'h0, x} << 15) / {32'h0, y};
    return r[15:0];
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = exq.pop_front();
    checks++;
    if (q !== e.q || out_tag !== e.tag || cycle - e.t != 16) begin
      failures++;
      $display("FAIL q=%h exp=%h tag=%0d/%0d lat=%0d", q, e.q, out_tag, e.tag, cycle - e.t);
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      b = $urandom_range(1, 32'h7FFF_FFFF);
      unique case (n % 5)
        0: a = $urandom_range(0, 32'h7FFF_FFFF) % b;
        1: a = b;
        2: a = b + (b >> 1);
        3: begin a = b; b = b >> 2; end
        default: begin a = $urandom_range(0, 100); b = (n % 10 == 4) ? 0 : $urandom_range(1, 200); end
      endcase
      in_tag = 8'(n);
      if (in_valid) exq.push_back('{ref_q(a, b), in_tag, cycle});
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(negedge clk);
    checks++; if (exq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
