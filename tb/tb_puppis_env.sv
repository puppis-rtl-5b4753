// End-to-end test environment for puppis_top (instantiated with its default
// parameters). Builds one SSD frame in a behavioural main memory: per-layer
// ECLUTs (e^x sampled in binary32), random confidences, box modifiers,
// anchors on a jittered coarse grid (so that boxes overlap by varying amounts) and
// the box exponential table (e^x / 2). It configures the accelerator over
// AXI-Lite and runs FRAMES frames: the first started by the start bit, the
// rest through the cnn_done / ssd_ack / ssd_done / cnn_ack handshake.
//
// An independent bit-exact reference of the algorithm (softmax with
// float-selected fixed format and overflow rescaling, box decoding with the
// same shifts, greedy NMS with the same integer IoU, stable top-K) gives the
// expected scores, decoded boxes (read back from Memory 0) and detections.
// Softmax scores are also compared loosely with a real-valued softmax.
// Mechanisms counted, each must occur: softmax sum rescale, threshold
// filtering, NMS suppression, sort overflow, 4 KiB burst split (when
// NEED_SPLIT), handshake, and overlaps within 1/16 of TOVER, which differs
// between the first and later frames.
module tb_puppis_env #(
  parameter int unsigned NL           = 2,
  parameter int unsigned NB [6]       = '{40, 45, 0, 0, 0, 0},
  parameter int unsigned NCLS         = 4,
  parameter int unsigned FRAMES       = 2,
  parameter int unsigned TOPK         = 10,
  parameter int unsigned TVAL1        = 6554,    // 0.2 in Q1.15
  parameter int unsigned TVAL2        = 11469,   // 0.35
  parameter int unsigned TOVER1       = 14746,   // 0.45, first frame
  parameter int unsigned TOVER2       = 9830,    // 0.3, later frames
  parameter int unsigned MAX_CYCLES   = 5_000_000,
  parameter int unsigned SEED         = 1,
  parameter bit          NEED_SPLIT   = 1'b1     // the frame is big enough to cross 4 KiB
) ();
  import puppis_pkg::*;

  localparam int unsigned WORDS = 262144;
  localparam int unsigned SORTN = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always_ff @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------------ DUT
  logic cnn_done = 1'b0, cnn_ack = 1'b0, ssd_ack, ssd_done;
  logic [7:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 1'b0, wvalid = 1'b0, bready = 1'b1, arvalid = 1'b0, rready = 1'b1;
  logic [31:0] wdata = '0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;
  logic [31:0] m_araddr, m_awaddr, m_rdata, m_wdata;
  logic [7:0]  m_arlen, m_awlen;
  logic [2:0]  m_arsize, m_awsize;
  logic [1:0]  m_arburst, m_awburst, m_rresp, m_bresp;
  logic        m_arvalid, m_arready, m_rlast, m_rvalid, m_rready, m_awvalid, m_awready;
  logic [3:0]  m_wstrb;
  logic        m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;

  puppis_top u_dut (
    .clk, .rst_n, .cnn_done, .ssd_ack, .ssd_done, .cnn_ack,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .m_axi_araddr(m_araddr), .m_axi_arlen(m_arlen), .m_axi_arsize(m_arsize),
    .m_axi_arburst(m_arburst), .m_axi_arvalid(m_arvalid), .m_axi_arready(m_arready),
    .m_axi_rdata(m_rdata), .m_axi_rresp(m_rresp), .m_axi_rlast(m_rlast),
    .m_axi_rvalid(m_rvalid), .m_axi_rready(m_rready),
    .m_axi_awaddr(m_awaddr), .m_axi_awlen(m_awlen), .m_axi_awsize(m_awsize),
    .m_axi_awburst(m_awburst), .m_axi_awvalid(m_awvalid), .m_axi_awready(m_awready),
    .m_axi_wdata(m_wdata), .m_axi_wstrb(m_wstrb), .m_axi_wlast(m_wlast),
    .m_axi_wvalid(m_wvalid), .m_axi_wready(m_wready),
    .m_axi_bresp(m_bresp), .m_axi_bvalid(m_bvalid), .m_axi_bready(m_bready)
  );

  tb_axi_mem #(.WORDS(WORDS), .STALL_PCT(20)) u_mem (
    .clk, .rst_n,
    .araddr(m_araddr), .arlen(m_arlen), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr(m_awaddr), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready)
  );

  // ------------------------------------------------------- mechanism counters
  int n_rescale = 0, n_filtered = 0, n_suppressed = 0, n_sort_ovf = 0, n_split = 0, n_handshake = 0;
  int n_near_tover = 0;   // overlaps within 1/16 of TOVER, on either side
  int n_ph_softmax = 0, n_ph_boxes = 0, n_ph_nms = 0, n_ph_sort = 0;
  phase_e last_phase = PH_READY;
  longint ph_cycles [5] = '{0, 0, 0, 0, 0};   // cycles spent in each phase, all frames
  always_ff @(posedge clk) if (rst_n) begin
    if (u_dut.u_softmax.st == 2'd1 && u_dut.u_softmax.v_d && u_dut.u_softmax.sum_next[16])
      n_rescale <= n_rescale + 1;
    if (u_dut.u_serial_comp.in_valid && u_dut.u_serial_comp.in_ready &&
        u_dut.u_serial_comp.filter_en && !u_dut.u_serial_comp.pass)
      n_filtered <= n_filtered + 1;
    if (u_dut.keep_valid && !u_dut.keep) n_suppressed <= n_suppressed + 1;
    if (u_dut.u_nms.div_in_valid &&
        int'(u_dut.u_nms.div_in) > int'(u_dut.cfg.tover) - 2048 &&
        int'(u_dut.u_nms.div_in) < int'(u_dut.cfg.tover) + 2048)
      n_near_tover <= n_near_tover + 1;
    if (u_dut.u_sort.push && !u_dut.u_sort.busy && !u_dut.u_sort.clear &&
        u_dut.u_sort.count == 7'(SORTN))
      n_sort_ovf <= n_sort_ovf + 1;
    if (m_arvalid && m_arready && m_arlen != 8'd15 &&
        ({20'h0, m_araddr[11:0]} + ({24'h0, m_arlen} + 32'd1) * 4) == 32'h1000)
      n_split <= n_split + 1;
    last_phase <= u_dut.phase;
    ph_cycles[u_dut.phase] <= ph_cycles[u_dut.phase] + 1;
    if (u_dut.phase != last_phase) begin
      unique case (u_dut.phase)
        PH_SOFTMAX: n_ph_softmax <= n_ph_softmax + 1;
        PH_BOXES:   n_ph_boxes   <= n_ph_boxes + 1;
        PH_NMS:     n_ph_nms     <= n_ph_nms + 1;
        PH_SORT:    n_ph_sort    <= n_ph_sort + 1;
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------------------- helpers
  task automatic axil_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; wdata = d; awvalid = 1'b1; wvalid = 1'b1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    while (!bvalid) @(negedge clk);
  endtask

  task automatic axil_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1'b1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 1'b0;
    while (!rvalid) @(negedge clk);
    d = rdata;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ frame data
  localparam logic [31:0] ECLUT_A = 32'h0000_0000;   // 6 x 16 KiB
  localparam logic [31:0] BLUT_A  = 32'h0001_8000;
  localparam logic [31:0] CONF_A  = 32'h0002_0024;   // deliberately not 64-byte aligned
  int unsigned ntot, nbase [6];
  logic [31:0] conf_a [6], loc_a [6];
  logic [31:0] anchor_a, score_a, result_a;

  function automatic real lscale(input int l); return 1.0 / (16.0 * (1.0 + 0.5 * l)); endfunction

  // binary32 <-> real through the binary64 encoding (truncating the mantissa)
  function automatic logic [31:0] f32(input real x);
    logic [63:0] d;
    int e;
    d = $realtobits(x);
    e = int'(d[62:52]) - 1023 + 127;
    if (x == 0.0 || e <= 0) return 32'h0;
    if (e >= 255) return {d[63], 8'hFE, 23'h7FFFFF};
    return {d[63], 8'(e), d[51:29]};
  endfunction
  function automatic real r32(input logic [31:0] f);
    if (f[30:23] == 8'd0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'h0});
  endfunction

  function automatic logic [31:0] eclut_val(input int l, input int idx);
    int s;
    real x;
    s = (idx >= 2048) ? idx - 4096 : idx;
    x = s * lscale(l);
    if (x > 80.0) x = 80.0;
    return f32($exp(x));
  endfunction

  function automatic logic signed [15:0] blut_val(input int i);
    int s;
    real x, v;
    s = (i >= 512) ? i - 1024 : i;
    x = s * 64.0 / 4096.0;
    v = $exp(x) / 2.0 * 4096.0;
    if (v > 32767.0) v = 32767.0;
    return 16'($rtoi(v));
  endfunction

  // reference state
  int unsigned score_ref [32][2048];
  logic signed [15:0] box_ref [2048][4];
  int unsigned res_word [2048][3];
  int unsigned n_res_ref;
  bit ovf_ref;
  logic signed [15:0] xp [2048][4];
  logic signed [15:0] an [2048][4];
  logic signed [15:0] cf [2048][32];

  localparam logic signed [15:0] VX = 16'sd410, VY = 16'sd410, VW_ = 16'sd819, VH = 16'sd819;

  function automatic logic [15:0] divq(input logic [31:0] a, input logic [31:0] b);
    logic [63:0] q;
    if (b == 0 || {32'h0, a} >= {31'h0, b, 1'b0}) return 16'hFFFF;
    q = ({32'h0, a} << 15) / {32'h0, b};
    return q[15:0];
  endfunction

  function automatic logic signed [15:0] shr12(input logic signed [31:0] p);
    logic signed [31:0] t;
    t = p >>> 12;
    return t[15:0];
  endfunction

  task automatic build_frame();
    int unsigned a;
    ntot = 0;
    for (int l = 0; l < NL; l++) begin nbase[l] = ntot; ntot += NB[l]; end
    // ECLUTs and box table
    for (int l = 0; l < NL; l++)
      for (int i = 0; i < 4096; i++) u_mem.mem[(ECLUT_A >> 2) + l * 4096 + i] = eclut_val(l, i);
    for (int i = 0; i < 1024; i++) u_mem.mem[(BLUT_A >> 2) + i] = {16'h0, blut_val(i)};
    // confidences (Q7.8), modifiers (Q3.12), anchors (Q8.7)
    a = CONF_A;
    for (int l = 0; l < NL; l++) begin
      conf_a[l] = a;
      for (int b = 0; b < NB[l]; b++)
        for (int c = 0; c < NCLS; c++) begin
          logic signed [15:0] v;
          v = 16'($urandom_range(0, 1800)) - 16'sd900;
          if ($urandom_range(0, 9) == 0) v = 16'sd1500;    // some confident boxes
          cf[nbase[l] + b][c] = v;
          u_mem.mem[a >> 2] = {{16{v[15]}}, v};
          a += 4;
        end
    end
    for (int l = 0; l < NL; l++) begin
      loc_a[l] = a;
      for (int b = 0; b < NB[l]; b++)
        for (int q = 0; q < 4; q++) begin
          logic signed [15:0] v;
          v = 16'($urandom_range(0, 2400)) - 16'sd1200;    // about +-0.3
          xp[nbase[l] + b][q] = v;
          u_mem.mem[a >> 2] = {{16{v[15]}}, v};
          a += 4;
        end
    end
    anchor_a = a;
    for (int g = 0; g < ntot; g++) begin
      // centres on a coarse grid plus jitter, so overlaps spread over (0, 1)
      an[g][0] = 16'sd128 * 16'(20 + 10 * (g % 3)) + 16'($urandom_range(0, 640));   // cx
      an[g][1] = 16'sd128 * 16'(20 + 10 * ((g / 3) % 3)) + 16'($urandom_range(0, 640));
      an[g][2] = 16'sd128 * 16'(8 + (g % 5));         // w
      an[g][3] = 16'sd128 * 16'(8 + (g % 4));         // h
      for (int q = 0; q < 4; q++) begin
        u_mem.mem[a >> 2] = {{16{an[g][q][15]}}, an[g][q]};
        a += 4;
      end
    end
    score_a  = a;
    result_a = a + ntot * NCLS * 4;
  endtask

  task automatic reference(input int unsigned tval, input int unsigned tover);
    int unsigned fx [32];
    // softmax
    for (int l = 0; l < NL; l++)
      for (int b = 0; b < NB[l]; b++) begin
        int g, emax, sum, red;
        logic [31:0] f [32];
        g = nbase[l] + b;
        emax = 0;
        for (int c = 0; c < NCLS; c++) begin
          f[c] = eclut_val(l, int'(cf[g][c][15:4]));
          if (int'(f[c][30:23]) > emax) emax = int'(f[c][30:23]);
        end
        sum = 0; red = 0;
        for (int c = 0; c < NCLS; c++) begin
          int sh;
          sh = 8 + emax - int'(f[c][30:23]);
          fx[c] = (f[c][30:23] == 0 || sh >= 24) ? 0 : ({1'b1, f[c][22:0]} >> sh) & 32'hFFFF;
          sum = sum + (fx[c] >> red);
          if (sum >= 65536) begin sum = sum >> 1; red++; end
        end
        for (int c = 0; c < NCLS; c++) score_ref[c][g] = divq(fx[c] >> red, sum);
      end
    // boxes
    for (int g = 0; g < ntot; g++) begin
      logic signed [15:0] ix, iy, ew, eh, lw, lh, cx, cy, w, h;
      ix = shr12(xp[g][0] * an[g][2]);
      iy = shr12(xp[g][1] * an[g][3]);
      ew = shr12(xp[g][2] * VW_);
      eh = shr12(xp[g][3] * VH);
      lw = blut_val(int'(ew[15:6]));
      lh = blut_val(int'(eh[15:6]));
      cx = shr12(ix * VX) + an[g][0];
      cy = shr12(iy * VY) + an[g][1];
      w  = shr12(lw * an[g][2]);
      h  = shr12(lh * an[g][3]);
      box_ref[g][0] = cx - w; box_ref[g][1] = cy - h;
      box_ref[g][2] = cx + w; box_ref[g][3] = cy + h;
    end
    // NMS
    begin
      int unsigned rs [$], rc [$], rb [$];
      ovf_ref = 0;
      for (int c = 1; c < NCLS; c++) begin
        int cand [$];
        bit supp [64];
        for (int g = 0; g < ntot; g++)
          if (score_ref[c][g] > tval) begin
            if (cand.size() < SORTN) cand.push_back(g); else ovf_ref = 1;
          end
        // stable sort, highest score first
        for (int i = 1; i < cand.size(); i++) begin
          int t, k;
          t = cand[i]; k = i;
          while (k > 0 && score_ref[c][cand[k-1]] < score_ref[c][t]) begin cand[k] = cand[k-1]; k--; end
          cand[k] = t;
        end
        foreach (supp[i]) supp[i] = 0;
        for (int gi = 0; gi < cand.size(); gi++) begin
          logic [31:0] af;
          if (supp[gi]) continue;
          rs.push_back(score_ref[c][cand[gi]]); rc.push_back(c); rb.push_back(cand[gi]);
          af = area(cand[gi]);
          for (int jj = gi + 1; jj < cand.size(); jj++) begin
            logic [31:0] ai, au;
            if (supp[jj]) continue;
            ai = inter(cand[gi], cand[jj]);
            au = area(cand[jj]) + af - ai;
            if (!(divq(ai, au) < 16'(tover))) supp[jj] = 1;
          end
        end
      end
      // final sort: first SORTN results, stable, highest first
      begin
        int idx [$];
        int nout;
        for (int i = 0; i < rs.size(); i++) if (i < SORTN) idx.push_back(i); else ovf_ref = 1;
        for (int i = 1; i < idx.size(); i++) begin
          int t, k;
          t = idx[i]; k = i;
          while (k > 0 && rs[idx[k-1]] < rs[t]) begin idx[k] = idx[k-1]; k--; end
          idx[k] = t;
        end
        nout = (TOPK < idx.size()) ? TOPK : idx.size();
        n_res_ref = nout;
        for (int i = 0; i < nout; i++) begin
          int r;
          r = idx[i];
          res_word[i][0] = {rs[r][15:0], 5'(rc[r]), 11'(rb[r])};
          res_word[i][1] = {box_ref[rb[r]][0], box_ref[rb[r]][1]};
          res_word[i][2] = {box_ref[rb[r]][2], box_ref[rb[r]][3]};
        end
      end
    end
  endtask

  function automatic logic signed [15:0] clamp16(input int v);
    if (v < 0) return 0;
    if (v > 32767) return 16'sd32767;
    return 16'(v);
  endfunction
  function automatic logic [31:0] area(input int g);
    int dx, dy;
    dx = clamp16(int'(box_ref[g][2]) - int'(box_ref[g][0]));
    dy = clamp16(int'(box_ref[g][3]) - int'(box_ref[g][1]));
    return 32'(dx * dy);
  endfunction
  function automatic logic [31:0] inter(input int g, input int j);
    int x0, y0, x1, y1, dx, dy;
    x0 = (box_ref[g][0] > box_ref[j][0]) ? box_ref[g][0] : box_ref[j][0];
    y0 = (box_ref[g][1] > box_ref[j][1]) ? box_ref[g][1] : box_ref[j][1];
    x1 = (box_ref[g][2] < box_ref[j][2]) ? box_ref[g][2] : box_ref[j][2];
    y1 = (box_ref[g][3] < box_ref[j][3]) ? box_ref[g][3] : box_ref[j][3];
    dx = clamp16(x1 - x0);
    dy = clamp16(y1 - y0);
    return 32'(dx * dy);
  endfunction

  task automatic configure(input int unsigned tval, input int unsigned tover);
    axil_write(8'h08, NCLS);
    axil_write(8'h0C, NL);
    axil_write(8'h10, anchor_a);
    axil_write(8'h14, BLUT_A);
    axil_write(8'h18, score_a);
    axil_write(8'h1C, result_a);
    axil_write(8'h20, {VY, VX});
    axil_write(8'h24, {VH, VW_});
    axil_write(8'h28, {19'h0, 5'd12, 3'h0, 5'd12});
    axil_write(8'h2C, tval);
    axil_write(8'h30, tover);
    axil_write(8'h34, TOPK);
    axil_write(8'h38, 32'd1);              // class 0 is background
    for (int l = 0; l < NL; l++) begin
      axil_write(8'(8'h40 + 16 * l), NB[l]);
      axil_write(8'(8'h44 + 16 * l), conf_a[l]);
      axil_write(8'(8'h48 + 16 * l), loc_a[l]);
      axil_write(8'(8'h4C + 16 * l), ECLUT_A + 32'(l) * 32'h4000);
    end
  endtask

  task automatic check_frame(input int fr, input int unsigned tval, input int unsigned tover);
    logic [31:0] st;
    int bad_sm, bad_box, bad_loose;
    real maxerr;
    reference(tval, tover);
    bad_sm = 0; bad_box = 0; bad_loose = 0; maxerr = 0.0;
    for (int g = 0; g < ntot; g++)
      for (int c = 0; c < NCLS; c++)
        if (u_mem.mem[(score_a >> 2) + c * ntot + g] != score_ref[c][g]) bad_sm++;
    check(bad_sm == 0, $sformatf("frame %0d: %0d softmax scores differ", fr, bad_sm));
    // loose comparison with a real-valued softmax of the same table samples
    for (int l = 0; l < NL; l++)
      for (int b = 0; b < NB[l]; b++) begin
        real den, e;
        den = 0.0;
        for (int c = 0; c < NCLS; c++)
          den += r32((eclut_val(l, int'(cf[nbase[l]+b][c][15:4]))));
        for (int c = 0; c < NCLS; c++) begin
          e = r32((eclut_val(l, int'(cf[nbase[l]+b][c][15:4])))) / den;
          e = e - real'(u_mem.mem[(score_a >> 2) + c * ntot + nbase[l] + b]) / 32768.0;
          if (e < 0) e = -e;
          if (e > maxerr) maxerr = e;
          if (e > 0.01) bad_loose++;
        end
      end
    check(bad_loose == 0, $sformatf("frame %0d: %0d scores off the real softmax by >0.01 (max %f)", fr, bad_loose, maxerr));
    for (int g = 0; g < ntot; g++) begin
      if (u_dut.u_mem0.ram[2*g]   != {box_ref[g][0], box_ref[g][1]}) bad_box++;
      if (u_dut.u_mem0.ram[2*g+1] != {box_ref[g][2], box_ref[g][3]}) bad_box++;
    end
    check(bad_box == 0, $sformatf("frame %0d: %0d decoded box words differ", fr, bad_box));
    axil_read(8'h04, st);
    check(st[31:16] == 16'(n_res_ref), $sformatf("frame %0d: %0d results, expected %0d", fr, st[31:16], n_res_ref));
    check(st[3] == 1'b1, "done flag");
    check(st[4] == ovf_ref, $sformatf("frame %0d: overflow flag %0d expected %0d", fr, st[4], ovf_ref));
    for (int i = 0; i < n_res_ref; i++)
      for (int w = 0; w < 3; w++)
        check(u_mem.mem[(result_a >> 2) + 3 * i + w] == res_word[i][w],
              $sformatf("frame %0d: result %0d word %0d = %h expected %h", fr, i, w,
                        u_mem.mem[(result_a >> 2) + 3 * i + w], res_word[i][w]));
    $display("frame %0d: %0d boxes, %0d classes, %0d detections, max |score - softmax| = %f",
             fr, ntot, NCLS, n_res_ref, maxerr);
  endtask

  // ------------------------------------------------------------------ run
  initial begin
    longint t0;
    void'($urandom(SEED));
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    build_frame();
    configure(TVAL1, TOVER1);
    // frame 1: started by software
    t0 = cycle;
    axil_write(8'h00, 32'h1);
    wait (ssd_done);
    $display("frame 1 took %0d cycles", cycle - t0);
    check(cycle - t0 < longint'(ntot) * (NCLS * 12 + 120) + 40000, "frame 1 cycle budget");
    check_frame(1, TVAL1, TOVER1);
    @(negedge clk); cnn_ack = 1'b1; @(negedge clk); cnn_ack = 1'b0;
    repeat (2) @(negedge clk);
    check(!ssd_done, "ssd_done falls after cnn_ack");
    for (int fr = 2; fr <= FRAMES; fr++) begin
      configure(TVAL2, TOVER2);
      axil_write(8'h00, 32'h2);            // auto-start on cnn_done
      @(negedge clk); cnn_done = 1'b1;
      t0 = cycle;
      while (!ssd_ack) @(negedge clk);
      cnn_done = 1'b0;
      n_handshake++;
      wait (ssd_done);
      $display("frame %0d took %0d cycles", fr, cycle - t0);
      check_frame(fr, TVAL2, TOVER2);
      @(negedge clk); cnn_ack = 1'b1; @(negedge clk); cnn_ack = 1'b0;
      n_handshake++;
    end
    $display("mechanisms: rescale=%0d filtered=%0d suppressed=%0d sort_overflow=%0d burst_split=%0d handshake=%0d near_tover=%0d phases=%0d/%0d/%0d/%0d",
             n_rescale, n_filtered, n_suppressed, n_sort_ovf, n_split, n_handshake, n_near_tover,
             n_ph_softmax, n_ph_boxes, n_ph_nms, n_ph_sort);
    $display("cycles per phase over all frames: softmax=%0d boxes=%0d nms=%0d sort=%0d",
             ph_cycles[PH_SOFTMAX], ph_cycles[PH_BOXES], ph_cycles[PH_NMS], ph_cycles[PH_SORT]);
    check(n_rescale > 0, "softmax sum rescale never happened");
    check(n_filtered > 0, "threshold filter never dropped a score");
    check(n_suppressed > 0, "NMS never suppressed a box");
    check(n_near_tover > 0, "no overlap came near TOVER");
    check(n_sort_ovf > 0 || SORTN >= ntot, "sorter never overflowed");
    check(n_split > 0 || !NEED_SPLIT, "no burst was split at a 4 KiB boundary");
    check(n_handshake > 0 || FRAMES < 2, "handshake start never used");
    check(n_ph_softmax == FRAMES && n_ph_boxes == FRAMES && n_ph_nms == FRAMES && n_ph_sort == FRAMES,
          "phase sequence SOFTMAX/BOXES/NMS/SORT once per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycle == longint'(MAX_CYCLES));
    failures++;
    $display("watchdog: simulation did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
