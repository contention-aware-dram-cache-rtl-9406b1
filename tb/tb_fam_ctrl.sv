// Self-checking testbench of fam_ctrl, the prefetch-aware FAM controller.
//
// Four nodes send random traffic: demand reads and writes of 64 B lines and
// 256 B blocks, core prefetches of lines, DRAM-cache prefetches of blocks,
// and promotions of prefetches they sent before (some still queued, some
// already gone). The device side takes requests with a random ready.
//
// The bench keeps its own demand and prefetch queues, filled from the
// handshakes it sees: a promotion moves the oldest queued prefetch of its
// address to the demand tail, or counts as dropped. Every issue decision must
// take the head of the queue it names, in order, and every request handed to
// the device must be the next one issued. The spacing between issues must be
// at least 2 cycles per 64 B of the previous request. In a saturated phase
// (both queues always full, device always ready) the spacing must be exact
// and the weighted fair share must be two demands per DRAM-cache prefetch.
// Completions must reach exactly the node they name. At the end all queues
// drain and the controller's counters equal the bench's.
module tb_fam_ctrl;
  import cxl_dc_pkg::*;

  localparam int NODES = 4;
  localparam int II    = 2;

  logic                 clk = 0, rst_n = 0;
  logic     [NODES-1:0] req_valid = '0, req_ready;
  m2s_req_t [NODES-1:0] req = '0;
  logic                 dev_req_valid, dev_req_ready = 0;
  m2s_req_t             dev_req;
  logic                 dev_rsp_valid = 0, dev_rsp_ready;
  s2m_rsp_t             dev_rsp = '0;
  logic     [NODES-1:0] rsp_valid, rsp_ready = '0;
  s2m_rsp_t             rsp;
  logic [31:0]          n_promoted, n_promote_dropped, n_demand_issued, n_prefetch_issued;

  fam_ctrl #(.NODES(NODES), .DQ_DEPTH(8), .PQ_DEPTH(8), .ISSUE_INTERVAL(II),
             .DC_BLK_OFF(8), .W(2)) dut (.*);

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
    #3_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference queues
  m2s_req_t dq[$], pq[$], issued[$];
  int m_promoted = 0, m_dropped = 0, m_dem = 0, m_pf = 0;
  longint cyc = 0, last_issue = -100;
  int     need_gap = 0;
  bit     saturate = 0;
  int     sat_d = 0, sat_p = 0, gap_exact = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // issue decisions, against the heads before this cycle's intake
    if (dut.iss_d || dut.iss_p) begin
      m2s_req_t h;
      check(!(dut.iss_d && dut.iss_p), "one issue per slot");
      check(cyc - last_issue >= need_gap, $sformatf("issue gap %0d < %0d", cyc - last_issue, need_gap));
      if (saturate && cyc - last_issue == need_gap) gap_exact++;
      if (saturate) begin
        check(cyc - last_issue == need_gap, $sformatf("saturated gap exact %0d %0d d=%0b dq=%0d pq=%0d", cyc - last_issue, need_gap, dut.iss_d, dq.size(), pq.size()));
        if (dut.iss_d) sat_d++; else sat_p++;
      end
      if (dut.iss_d) begin
        check(dq.size() != 0, "demand issue from empty queue");
        h = dq.pop_front();
        m_dem++;
      end else begin
        check(pq.size() != 0, "prefetch issue from empty queue");
        h = pq.pop_front();
        m_pf++;
      end
      check(dut.iss_req == h, $sformatf("issued %h exp %h", dut.iss_req, h));
      issued.push_back(h);
      need_gap   = II * (h.dc_block ? 4 : 1);
      last_issue = cyc;
    end
    // intake
    for (int n = 0; n < NODES; n++) if (req_valid[n] && req_ready[n]) begin
      m2s_req_t r;
      r = req[n];
      check($countones(req_valid & req_ready) == 1, "one intake per cycle");
      if (r.opc == M2S_PROMOTE) begin
        int f;
        f = -1;
        foreach (pq[i]) if (f < 0 && pq[i].addr == r.addr) f = i;
        if (f >= 0) begin
          dq.push_back(pq[f]);
          pq.delete(f);
          m_promoted++;
        end else m_dropped++;
      end else if (r.pf_hint) pq.push_back(r);
      else dq.push_back(r);
    end
    // device side
    if (dev_req_valid && dev_req_ready) begin
      check(issued.size() != 0, "device request without issue");
      if (issued.size() != 0) check(dev_req == issued.pop_front(), "device request order");
    end
  end

  // ---------------- traffic
  logic [47:0] pf_addrs[$];
  int          mode = 0;   // 0 random mix, 1 saturate, 2 idle

  function automatic m2s_req_t gen(int n);
    m2s_req_t r;
    int k;
    r = '0;
    r.node = NODE_W'(n);
    r.tag  = 8'($urandom);
    r.addr = 48'($urandom_range(63)) << 8;
    if (mode == 1) begin
      if (n < 2) begin r.opc = M2S_MEM_RD; end
      else begin r.opc = M2S_MEM_RD; r.pf_hint = 1; r.dc_block = 1; end
      return r;
    end
    k = $urandom_range(99);
    if (k < 30) begin r.opc = M2S_MEM_RD; r.dc_block = ($urandom_range(3) == 0); end
    else if (k < 40) begin r.opc = M2S_MEM_WR; r.dc_block = $urandom_range(1); end
    else if (k < 55) begin r.opc = M2S_MEM_RD; r.pf_hint = 1; end
    else if (k < 80) begin r.opc = M2S_MEM_RD; r.pf_hint = 1; r.dc_block = 1; end
    else if (pf_addrs.size() != 0) begin
      r.opc = M2S_PROMOTE; r.pf_hint = 1; r.dc_block = 1;
      r.addr = pf_addrs[$urandom_range(pf_addrs.size() - 1)];
    end else r.opc = M2S_MEM_RD;
    return r;
  endfunction

  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      if (req_valid[n] && req_ready[n]) begin
        if (req[n].pf_hint && req[n].opc != M2S_PROMOTE) begin
          pf_addrs.push_back(req[n].addr);
          if (pf_addrs.size() > 12) void'(pf_addrs.pop_front());
        end
        req_valid[n] = 0;
      end
      if (!req_valid[n] && mode != 2 && (mode == 1 || $urandom_range(99) < 40)) begin
        req[n] = gen(n);
        req_valid[n] = 1;
      end
    end
    dev_req_ready = (mode == 1) ? 1'b1 : ($urandom_range(99) < 60);
  end

  // completions: routed to the node they name
  int n_rsp = 0;
  always @(negedge clk) if (rst_n) begin
    dev_rsp_valid = ($urandom_range(99) < 30);
    dev_rsp = '{pf_hint: $urandom_range(1), dc_block: $urandom_range(1),
                addr: {$urandom, $urandom}, tag: 8'($urandom), node: NODE_W'($urandom_range(NODES - 1))};
    rsp_ready = 4'($urandom);
    #1;
    check(rsp_valid == (dev_rsp_valid ? (4'b1 << dev_rsp.node) : 4'b0), "completion routing");
    check(dev_rsp_ready == rsp_ready[dev_rsp.node] && rsp == dev_rsp, "completion ready and fields");
    if (dev_rsp_valid && dev_rsp_ready) n_rsp++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    mode = 0;
    repeat (4000) @(negedge clk);
    // saturated phase: wait until both queues fill, then measure
    mode = 1;
    repeat (150) @(negedge clk);
    saturate = 1;
    repeat (600) @(negedge clk);
    saturate = 0;
    mode = 2;
    repeat (400) @(negedge clk);
    check(dq.size() == 0 && pq.size() == 0 && issued.size() == 0, "all drained");
    check(n_demand_issued == 32'(m_dem) && n_prefetch_issued == 32'(m_pf), "issue counters");
    check(n_promoted == 32'(m_promoted) && n_promote_dropped == 32'(m_dropped), "promotion counters");
    check(m_promoted > 0 && m_dropped > 0, $sformatf("promotions %0d dropped %0d", m_promoted, m_dropped));
    check(sat_p > 10 && (sat_d == 2 * sat_p || sat_d == 2 * sat_p + 1 || sat_d == 2 * sat_p + 2),
          $sformatf("saturated share demand %0d prefetch %0d", sat_d, sat_p));
    check(gap_exact > 50, "exact spacing seen");
    $display("demand=%0d prefetch=%0d promoted=%0d dropped=%0d sat_d=%0d sat_p=%0d rsp=%0d",
             m_dem, m_pf, m_promoted, m_dropped, sat_d, sat_p, n_rsp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
