// Self-checking testbench of cxl_agent, the CXL.mem side of a root complex.
//
// Random requests of every class are offered while the link side takes
// messages only some of the time, so the output FIFO fills and pushes back.
// Every message leaving on the link is compared, in order, with the message
// the bench expects for the request: opcode (read, write or promotion), the
// prefetch mark on everything but demand reads and writes, the block mark on
// DRAM-cache prefetches, promotions and block transfers, the node number, the
// address and the tag. Completions of each mark combination are checked for
// their decoded class and for the handshake passing straight through.
module tb_cxl_agent;
  import cxl_dc_pkg::*;

  localparam int NODE = 2;

  logic     clk = 0, rst_n = 0;
  logic     rc_req_valid = 0, rc_req_ready;
  fam_req_t rc_req = '0;
  logic     link_req_valid, link_req_ready = 0;
  m2s_req_t link_req;
  logic     link_rsp_valid = 0, link_rsp_ready;
  s2m_rsp_t link_rsp = '0;
  logic     rc_rsp_valid, rc_rsp_ready = 0;
  fam_rsp_t rc_rsp;

  cxl_agent #(.NODE_ID(NODE), .OUT_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic m2s_req_t expect_msg(fam_req_t r);
    m2s_req_t m;
    m.addr = r.addr;
    m.tag  = r.tag;
    m.node = NODE_W'(NODE);
    case (r.op)
      FAM_DEM_RD:  begin m.opc = M2S_MEM_RD;  m.pf_hint = 0; m.dc_block = r.sub_page; end
      FAM_DEM_WR:  begin m.opc = M2S_MEM_WR;  m.pf_hint = 0; m.dc_block = r.sub_page; end
      FAM_CORE_PF: begin m.opc = M2S_MEM_RD;  m.pf_hint = 1; m.dc_block = r.sub_page; end
      FAM_DC_PF:   begin m.opc = M2S_MEM_RD;  m.pf_hint = 1; m.dc_block = 1; end
      default:     begin m.opc = M2S_PROMOTE; m.pf_hint = 1; m.dc_block = 1; end
    endcase
    return m;
  endfunction

  m2s_req_t exp_q[$];
  int n_sent = 0, n_got = 0, n_backpressure = 0;

  // link side: random ready, compare in order
  always @(posedge clk) if (rst_n) begin
    if (link_req_valid && link_req_ready) begin
      check(exp_q.size() != 0, "message without request");
      if (exp_q.size() != 0) begin
        m2s_req_t e;
        e = exp_q.pop_front();
        check(link_req == e, $sformatf("message %h exp %h", link_req, e));
      end
      n_got++;
    end
    if (rc_req_valid && rc_req_ready) begin
      exp_q.push_back(expect_msg(rc_req));
      n_sent++;
    end
    if (rc_req_valid && !rc_req_ready) n_backpressure++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2000) begin
      @(negedge clk);
      link_req_ready = ($urandom_range(99) < 35);
      if (!rc_req_valid || rc_req_ready) begin
        rc_req_valid = ($urandom_range(99) < 70);
        rc_req.op       = fam_op_e'($urandom_range(4));
        rc_req.sub_page = $urandom_range(1);
        rc_req.addr     = {$urandom, $urandom} & 48'hFFFF_FFFF_FFC0;
        rc_req.tag      = $urandom;
        rc_req.node     = 0;
      end
    end
    @(negedge clk);
    rc_req_valid = 0;
    link_req_ready = 1;
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0 && n_sent == n_got && n_sent > 500, $sformatf("sent %0d got %0d", n_sent, n_got));
    check(n_backpressure > 0, "FIFO full seen");

    // completions: decoded class, pass-through handshake
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      link_rsp = '{pf_hint: i[1], dc_block: i[0], addr: 48'h1234_5600 + 48'(i), tag: 8'(i + 7), node: NODE_W'(NODE)};
      link_rsp_valid = 1;
      rc_rsp_ready = i[0];
      #1;
      check(rc_rsp_valid && link_rsp_ready == i[0], "completion handshake");
      check(rc_rsp.addr == link_rsp.addr && rc_rsp.tag == link_rsp.tag, "completion fields");
      check(rc_rsp.op == (i == 3 ? FAM_DC_PF : i == 2 ? FAM_CORE_PF : FAM_DEM_RD),
            $sformatf("completion class %0d for marks %0d", rc_rsp.op, i));
    end
    @(negedge clk);
    link_rsp_valid = 0;
    $display("sent=%0d backpressure_cycles=%0d", n_sent, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
