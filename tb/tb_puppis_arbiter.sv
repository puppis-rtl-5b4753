// Unit test of puppis_arbiter: for every phase, read route and write route,
// random values on all inputs; each output must come from the source the
// routing table selects (read stream to one consumer with its ready returned,
// memory ports to the table load / Softmax / Boxes / Control, Sort input from
// the stream or from Control, write stream from Softmax or Control).
module tb_puppis_arbiter;
  import puppis_pkg::*;
  phase_e phase; rd_route_e rd_route; wr_route_e wr_route;
  logic sc_valid, sc_ready, sm_cnf_valid, sm_cnf_ready, sm_eclut_re;
  logic [31:0] sc_data; logic [15:0] sc_idx, sm_cnf_data, sm_score, bx_in_data;
  logic [11:0] sm_eclut_addr, bx_lut_addr;
  mem_req_t sm_imem, ctl_mem0, ctl_mem1, mem0, mem1;
  logic sm_score_valid, sm_score_ready, bx_in_valid, bx_in_ready, bx_lut_re;
  logic [31:0] sm_wr_addr, ctl_wr_addr, ctl_wr_data, wr_addr, wr_data;
  logic ctl_sort_push, sort_push, ctl_wr_valid, ctl_wr_ready, wr_valid, wr_ready;
  logic [15:0] ctl_sort_key, ctl_sort_payload, sort_key, sort_payload;
  int checks = 0, failures = 0;
  puppis_arbiter dut (.*);

  task automatic expect_(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s ph=%0d rd=%0d wr=%0d", what, phase, rd_route, wr_route); end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic fire;
      phase    = phase_e'($urandom_range(0, 4));
      rd_route = rd_route_e'($urandom_range(0, 5));
      wr_route = wr_route_e'($urandom_range(0, 2));
      {sc_valid, sm_cnf_ready, sm_eclut_re, sm_score_valid, bx_in_ready, bx_lut_re,
       ctl_sort_push, ctl_wr_valid, wr_ready} = 9'($urandom);
      sc_data = $urandom; sc_idx = 16'($urandom); sm_eclut_addr = 12'($urandom);
      bx_lut_addr = 12'($urandom); sm_score = 16'($urandom);
      sm_imem = {$urandom, $urandom}; ctl_mem0 = {$urandom, $urandom}; ctl_mem1 = {$urandom, $urandom};
      sm_wr_addr = $urandom; ctl_wr_addr = $urandom; ctl_wr_data = $urandom;
      ctl_sort_key = 16'($urandom); ctl_sort_payload = 16'($urandom);
      #1;
      // read stream
      case (rd_route)
        RD_SOFTMAX: expect_(sc_ready == sm_cnf_ready && sm_cnf_valid == sc_valid && !bx_in_valid &&
                            sm_cnf_data == sc_data[15:0], "rd softmax");
        RD_BOXES:   expect_(sc_ready == bx_in_ready && bx_in_valid == sc_valid && !sm_cnf_valid &&
                            bx_in_data == sc_data[15:0], "rd boxes");
        RD_NONE:    expect_(!sc_ready && !sm_cnf_valid && !bx_in_valid, "rd none");
        default:    expect_(sc_ready && !sm_cnf_valid && !bx_in_valid, "rd sink");
      endcase
      fire = sc_valid && sc_ready;
      // sort input
      if (rd_route == RD_SORT)
        expect_(sort_push == fire && sort_key == sc_data[15:0] && sort_payload == sc_idx, "sort stream");
      else
        expect_(sort_push == ctl_sort_push && sort_key == ctl_sort_key &&
                sort_payload == ctl_sort_payload, "sort ctl");
      // memories
      if (phase == PH_SOFTMAX) begin
        expect_(mem0.we == (fire && rd_route == RD_MEM0) && mem0.waddr == sc_idx[11:0] &&
                mem0.wdata == sc_data && mem0.re == sm_eclut_re && mem0.raddr == sm_eclut_addr, "mem0 sm");
        expect_(mem1 == sm_imem, "mem1 sm");
      end else if (phase == PH_BOXES) begin
        expect_(mem0 == ctl_mem0, "mem0 bx");
        expect_(mem1.we == (fire && rd_route == RD_MEM1) && mem1.waddr == sc_idx[11:0] &&
                mem1.wdata == sc_data && mem1.re == bx_lut_re && mem1.raddr == bx_lut_addr, "mem1 bx");
      end else
        expect_(mem0 == ctl_mem0 && mem1 == ctl_mem1, "mem ctl");
      // write stream
      case (wr_route)
        WR_SOFTMAX: expect_(wr_valid == sm_score_valid && wr_addr == sm_wr_addr &&
                            wr_data == 32'(sm_score) && sm_score_ready == wr_ready && !ctl_wr_ready, "wr sm");
        WR_CTRL:    expect_(wr_valid == ctl_wr_valid && wr_addr == ctl_wr_addr &&
                            wr_data == ctl_wr_data && ctl_wr_ready == wr_ready && !sm_score_ready, "wr ctl");
        default:    expect_(!wr_valid && !ctl_wr_ready && !sm_score_ready, "wr none");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
