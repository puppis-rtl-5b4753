// Unit test of puppis_softmax with a Memory 0 holding an ECLUT, a Memory 1 as
// the intermediate memory and the Divider. Boxes of random Q7.8 confidences
// (some with one very confident class, so that the fixed-point sum overflows
// and is rescaled) are streamed in with random gaps; the scores, taken under
// random back-pressure, must come out per class in order and match a
// bit-exact model of the three stages. The class count changes between runs.
module tb_puppis_softmax;
  import puppis_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [5:0] num_classes = 6'd21;
  logic cnf_valid = 0, cnf_ready, eclut_re, div_valid, div_in_valid, score_valid, score_ready = 0, busy;
  logic [15:0] cnf_in = 0, div_a, div_b, div_in, score_out;
  logic [11:0] eclut_addr;
  logic [31:0] eclut_in, imem_rdata;
  mem_req_t imem;
  logic [4:0] div_tag, div_in_tag, score_cls;
  int checks = 0, failures = 0, rescaled = 0;
  typedef struct { logic [15:0] s; logic [4:0] c; } exp_t;
  exp_t expq [$];
  always #5 clk = ~clk;

  puppis_softmax dut (.*);
  puppis_mem #(.DEPTH(4096), .WIDTH(32)) u_m0 (.clk, .we(1'b0), .waddr(12'h0), .wdata(32'h0),
                                               .re(eclut_re), .raddr(eclut_addr), .rdata(eclut_in));
  puppis_mem #(.DEPTH(4096), .WIDTH(32)) u_m1 (.clk, .we(imem.we), .waddr(imem.waddr), .wdata(imem.wdata),
                                               .re(imem.re), .raddr(imem.raddr), .rdata(imem_rdata));
  puppis_divider #(.NW(16), .TAGW(5)) u_div (.clk, .rst_n, .in_valid(div_valid), .a(div_a), .b(div_b),
      .in_tag(div_tag), .out_valid(div_in_valid), .q(div_in), .out_tag(div_in_tag));

  function automatic logic [31:0] f32(input real x);
    logic [63:0] d; int e;
    d = $realtobits(x);
    e = int'(d[62:52]) - 1023 + 127;
    if (x == 0.0 || e <= 0) return 32'h0;
    if (e >= 255) return {d[63], 8'hFE, 23'h7FFFFF};
    return {d[63], 8'(e), d[51:29]};
  endfunction
  function automatic logic [31:0] eclut_val(input int idx);
    int s; real x;
    s = (idx >= 2048) ? idx - 4096 : idx;
    x = s / 16.0;
    if (x > 80.0) x = 80.0;
    return f32($exp(x));
  endfunction
  function automatic logic [15:0] divq(input logic [31:0] a, input logic [31:0] b);
    logic [63:0] q;
    if (b == 0 || {32'h0, a} >= {31'h0, b, 1'b0}) return 16'hFFFF;
    q = ({32'h0, a} << 15) / {32'h0, b};
    return q[15:0];
  endfunction

  always @(negedge clk) score_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n && score_valid && score_ready) begin
    exp_t e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL extra score"); end
    else begin
      e = expq.pop_front();
      if (score_out !== e.s || score_cls !== e.c) begin
        failures++; $display("FAIL score %h/%h class %0d/%0d", score_out, e.s, score_cls, e.c);
      end
    end
  end

  task automatic run_box(input int ncls);
    logic signed [15:0] cf [32];
    logic [31:0] f [32];
    int unsigned fx [32];
    int emax = 0, sum = 0, red = 0;
    for (int c = 0; c < ncls; c++) begin
      cf[c] = 16'($urandom_range(0, 1800)) - 16'sd900;
      if ($urandom_range(0, 9) == 0) cf[c] = 16'sd1500;
      f[c] = eclut_val(int'(cf[c][15:4]));
      if (int'(f[c][30:23]) > emax) emax = int'(f[c][30:23]);
    end
    for (int c = 0; c < ncls; c++) begin
      int sh;
      sh = 8 + emax - int'(f[c][30:23]);
      fx[c] = (f[c][30:23] == 0 || sh >= 24) ? 0 : ({1'b1, f[c][22:0]} >> sh) & 32'hFFFF;
      sum = sum + (fx[c] >> red);
      if (sum >= 65536) begin sum = sum >> 1; red++; end
    end
    if (red > 0) rescaled++;
    for (int c = 0; c < ncls; c++) expq.push_back('{divq(fx[c] >> red, sum), 5'(c)});
    for (int c = 0; c < ncls; c++) begin
      @(negedge clk); cnf_valid = 1; cnf_in = cf[c];
      do @(posedge clk); while (!cnf_ready);
      @(negedge clk); cnf_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) u_m0.ram[i] = eclut_val(i);
    repeat (3) @(negedge clk); rst_n = 1;
    for (int b = 0; b < 60; b++) run_box(21);
    while (busy || expq.size() != 0) @(negedge clk);
    num_classes = 6'd3;   // the class count only changes between frames
    for (int b = 0; b < 30; b++) run_box(3);
    while (busy || expq.size() != 0) @(negedge clk);
    num_classes = 6'd32;   // the class count only changes between frames
    for (int b = 0; b < 10; b++) run_box(32);
    repeat (300) @(negedge clk);
    checks++; if (expq.size() != 0 || busy) begin failures++; $display("FAIL %0d scores missing", expq.size()); end
    checks++; if (rescaled < 5) begin failures++; $display("FAIL only %0d rescales", rescaled); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("WD expq=%0d busy=%0d st=%0d", expq.size(), busy, dut.st); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
