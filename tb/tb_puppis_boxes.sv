// Unit test of puppis_boxes with its Mults and a Memory 1 holding the e^x/2
// table: random box modifiers and anchors are streamed in (random gaps), the
// decoded rectangles are taken under random back-pressure and compared
// bit-exactly with a reference model of the same fixed-point sequence
// (Q3.12 modifiers and variances, Q8.7 anchors, both shifts 12, table index
// x[15:6]).
module tb_puppis_boxes;
  import puppis_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] var_x = 16'd410, var_y = 16'd410, var_w = 16'd819, var_h = 16'd819;
  logic [4:0] sh1 = 5'd12, sh2 = 5'd12;
  logic in_valid = 0, in_ready, rect_valid, rect_ready = 0, lut_re;
  logic [15:0] in_data = 0;
  logic [3:0] m_valid, m_out_valid;
  logic signed [15:0] m_a [4], m_b [4];
  logic signed [31:0] m_p [4];
  logic [11:0] lut_addr;
  logic [31:0] lut_in;
  logic [63:0] rect_out;
  int checks = 0, failures = 0;
  logic [63:0] expq [$];
  always #5 clk = ~clk;

  puppis_boxes dut (.*);
  puppis_mults #(.LANES(4), .W(16)) u_mults (.clk, .rst_n, .in_valid(m_valid), .a(m_a), .b(m_b),
                                             .out_valid(m_out_valid), .p(m_p));
  puppis_mem #(.DEPTH(4096), .WIDTH(32)) u_lut (.clk, .we(1'b0), .waddr(12'h0), .wdata(32'h0),
                                                .re(lut_re), .raddr(lut_addr), .rdata(lut_in));

  function automatic logic signed [15:0] blut_val(input int i);
    int s; real x, v;
    s = (i >= 512) ? i - 1024 : i;
    x = s * 64.0 / 4096.0;
    v = $exp(x) / 2.0 * 4096.0;
    if (v > 32767.0) v = 32767.0;
    return 16'($rtoi(v));
  endfunction
  function automatic logic signed [15:0] shr12(input logic signed [31:0] p);
    logic signed [31:0] t; t = p >>> 12; return t[15:0];
  endfunction

  always @(negedge clk) rect_ready <= ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n && rect_valid && rect_ready) begin
    logic [63:0] e;
    checks++;
    e = expq.pop_front();
    if (rect_out !== e) begin failures++; $display("FAIL rect %h exp %h", rect_out, e); end
  end

  initial begin
    for (int i = 0; i < 1024; i++) u_lut.ram[i] = {16'h0, blut_val(i)};
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic signed [15:0] xp [4], an [4];
      logic signed [15:0] ix, iy, ew, eh, lw, lh, cx, cy, w, h;
      for (int q = 0; q < 4; q++) xp[q] = 16'($urandom_range(0, 8000)) - 16'sd4000;
      if (n % 10 == 0) begin xp[2] = 16'sh7FFF; xp[3] = 16'sh8000; end  // table ends
      an[0] = 16'($urandom_range(0, 38400)); an[1] = 16'($urandom_range(0, 38400));
      an[2] = 16'($urandom_range(64, 6400)); an[3] = 16'($urandom_range(64, 6400));
      ix = shr12(xp[0] * an[2]); iy = shr12(xp[1] * an[3]);
      ew = shr12(xp[2] * 16'sd819); eh = shr12(xp[3] * 16'sd819);
      lw = blut_val(int'(ew[15:6])); lh = blut_val(int'(eh[15:6]));
      cx = shr12(ix * 16'sd410) + an[0]; cy = shr12(iy * 16'sd410) + an[1];
      w = shr12(lw * an[2]); h = shr12(lh * an[3]);
      expq.push_back({16'(cx - w), 16'(cy - h), 16'(cx + w), 16'(cy + h)});
      for (int k = 0; k < 8; k++) begin
        in_data = (k < 4) ? xp[k] : an[k - 4];
        in_valid = 1;
        do @(posedge clk); while (!in_ready);
        @(negedge clk); in_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
    end
    repeat (50) @(negedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d rects missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
