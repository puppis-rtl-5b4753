// Unit test of puppis_nms with its two Mults lanes and the Divider: groups of
// boxes, each led by a reference box (in_first), enter one per cycle with
// random gaps. Every non-reference box must produce one result, in order,
// with keep = IoU < TOVER computed by a reference model (sides clamped at
// zero, IoU = floor(A_i * 2^15 / A_u)), and its score and tag unchanged.
// The groups mix disjoint, touching, nested and identical boxes. Every
// fourth group sets TOVER exactly to the IoU of one of its boxes (that box
// must be dropped), and the next group sets it one above (kept).
module tb_puppis_nms;
  import puppis_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] tover = 16'd14746;
  logic in_valid = 0, in_first = 0;
  logic signed [15:0] x_min_in = 0, y_min_in = 0, x_max_in = 0, y_max_in = 0;
  logic [15:0] score_in = 0;
  logic [7:0] tag_in = 0, res_tag;
  logic [1:0] m_valid, m_ov;
  logic signed [15:0] m_a [2], m_b [2];
  logic signed [31:0] m_p [2];
  logic div_valid, div_in_valid, keep_valid, keep_out;
  logic [31:0] div0_out, div1_out;
  logic [23:0] div_tag, div_in_tag;
  logic [15:0] div_in, res_score;
  int checks = 0, failures = 0, kept = 0, dropped = 0, n_equal = 0;
  typedef struct { bit keep; logic [15:0] s; logic [7:0] t; } exp_t;
  exp_t expq [$];
  always #5 clk = ~clk;

  puppis_nms #(.MUL_LAT(2), .TAGW(8)) dut (.*);
  puppis_mults #(.LANES(2), .W(16)) u_mults (.clk, .rst_n, .in_valid(m_valid), .a(m_a), .b(m_b),
                                             .out_valid(m_ov), .p(m_p));
  puppis_divider #(.NW(32), .TAGW(24)) u_div (.clk, .rst_n, .in_valid(div_valid), .a(div0_out),
      .b(div1_out), .in_tag(div_tag), .out_valid(div_in_valid), .q(div_in), .out_tag(div_in_tag));

  function automatic int clamp16(input int v);
    if (v < 0) return 0;
    if (v > 32767) return 32767;
    return v;
  endfunction
  function automatic int mx(input int a, input int b); return a > b ? a : b; endfunction
  function automatic int mn(input int a, input int b); return a < b ? a : b; endfunction

  always @(posedge clk) if (rst_n && keep_valid) begin
    exp_t e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL extra result"); end
    else begin
      e = expq.pop_front();
      if (keep_out !== e.keep || res_score !== e.s || res_tag !== e.t) begin
        failures++; $display("FAIL keep %0d/%0d score %h/%h tag %0d/%0d", keep_out, e.keep, res_score, e.s, res_tag, e.t);
      end
      if (keep_out) kept++; else dropped++;
    end
  end

  initial begin
    int f [4], b [4];
    repeat (3) @(negedge clk); rst_n = 1;
    for (int grp = 0; grp < 40; grp++) begin
      tover = 16'($urandom_range(3000, 30000));
      if (grp % 4 == 0) tover = 16'd16384;   // box 1 below has IoU exactly 0.5: dropped
      if (grp % 4 == 1) tover = 16'd16385;   // one above it: kept
      for (int n = 0; n < 20; n++) begin
        int bx [4];
        int cx0 = $urandom_range(0, 12000), cy0 = $urandom_range(0, 12000);
        bx[0] = cx0; bx[1] = cy0;
        bx[2] = cx0 + $urandom_range(0, 6000); bx[3] = cy0 + $urandom_range(0, 6000);
        if (n == 0) begin bx[0] = 4000; bx[1] = 4000; bx[2] = 9000; bx[3] = 9000; end
        if (n == 1) begin bx[0] = 4000; bx[1] = 4000; bx[2] = 9000; bx[3] = 6500; end    // IoU = 16384
        if (n == 3) begin bx[0] = 9000; bx[1] = 9000; bx[2] = 12000; bx[3] = 12000; end  // touching
        if (n == 4) begin bx[0] = 5000; bx[1] = 5000; bx[2] = 6000; bx[3] = 6000; end    // nested
        if (n == 5) bx = f;                                                              // identical
        if (n == 6) begin bx[0] = 20000; bx[1] = 0; bx[2] = 19000; bx[3] = 100; end      // inverted
        if (n == 0) f = bx;
        else begin
          int ai, af, ac, au;
          logic [63:0] q;
          logic [15:0] iou;
          af = clamp16(f[2] - f[0]) * clamp16(f[3] - f[1]);
          ac = clamp16(bx[2] - bx[0]) * clamp16(bx[3] - bx[1]);
          ai = clamp16(mn(f[2], bx[2]) - mx(f[0], bx[0])) * clamp16(mn(f[3], bx[3]) - mx(f[1], bx[1]));
          au = ac + af - ai;
          if (au == 0 || ai >= 2 * au) iou = 16'hFFFF;
          else begin q = (64'(ai) << 15) / 64'(au); iou = q[15:0]; end
          expq.push_back('{iou < tover, 16'(grp * 100 + n), 8'(n)});
          if (iou == tover) n_equal++;
        end
        @(negedge clk);
        in_valid = 1; in_first = (n == 0);
        x_min_in = 16'(bx[0]); y_min_in = 16'(bx[1]); x_max_in = 16'(bx[2]); y_max_in = 16'(bx[3]);
        score_in = 16'(grp * 100 + n); tag_in = 8'(n);
        @(negedge clk); in_valid = 0; in_first = 0;
        while ($urandom_range(0, 2) == 0) @(negedge clk);
      end
      repeat (30) @(negedge clk);   // results drain before the next reference box
    end
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    checks++; if (n_equal < 10) begin failures++; $display("FAIL IoU = TOVER only %0d times", n_equal); end
    checks++; if (kept < 20 || dropped < 20) begin failures++; $display("FAIL kept %0d dropped %0d", kept, dropped); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
