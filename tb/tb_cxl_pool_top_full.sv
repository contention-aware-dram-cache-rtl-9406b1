// Full-size run of cxl_pool_top: every parameter at its default.
//
// Four compute nodes, each with a 16 MiB, 16-way DRAM cache of 256 B blocks,
// a 256-entry prefetch queue and 4096-cycle sampling, share one FAM node with
// 32-entry demand and prefetch queues and WFQ weight 2. The bench plays the
// LLCs, local memory controllers and FAM device exactly as the end-to-end
// bench does (streams through 4 KiB pages, reuse, writebacks, core
// prefetches; a FAM whose latency and readiness change by phase), over a
// shorter run: metadata initialisation, non-adaptive prefetching, then
// adaptive prefetching with a fast, a slow and again a fast FAM, then drain.
//
// Checks: every LLC read answered exactly once with its own identifier, a
// DRAM-cache hit only on a block the node received as a prefetch, every
// DRAM-cache access inside the DRAM-cache region, no promotion at the device,
// completions back at the requesting node, and the counters of fills and
// evictions equal to what the local memory controllers saw. The mechanisms a
// run this short can reach in a 16 MiB cache with a 256-entry queue must each
// happen at least once (hit, miss, writeback hit, prefetch issue, redundant
// and throttled drops, demand waiting on a prefetch, promotion done and
// dropped, fill, stale prefetch,
// congestion, rate cut, WFQ both ways, back-pressure); evictions and queue
// overflow need a far longer run at this size and are only reported.
module tb_cxl_pool_top_full;
  import cxl_dc_pkg::*;

  localparam int          NODES     = 4;
  localparam int          BLK_OFF   = 8;
  localparam longint      DC_BYTES  = 64'd16777216;
  localparam logic [47:0] DC_BASE   = 48'h0000_4000_0000;
  localparam int          RUN_SCALE = 1;

  logic clk = 0, rst_n = 0, bwa_enable = 0;

  logic      [NODES-1:0] llc_req_valid = '0, llc_req_ready, llc_rsp_valid, llc_rsp_ready = '1;
  llc_req_t  [NODES-1:0] llc_req = '0;
  llc_rsp_t  [NODES-1:0] llc_rsp;
  logic      [NODES-1:0] lm_req_valid, lm_req_ready = '0, lm_rsp_valid = '0, lm_rsp_ready;
  lmem_req_t [NODES-1:0] lm_req;
  lmem_rsp_t [NODES-1:0] lm_rsp = '0;
  logic                  fam_req_valid, fam_req_ready = 0, fam_rsp_valid = 0, fam_rsp_ready;
  m2s_req_t              fam_req;
  s2m_rsp_t              fam_rsp = '0;
  rc_stats_t [NODES-1:0] stats;
  logic [NODES-1:0][15:0] pf_rate;
  logic      [NODES-1:0] congested;
  logic [31:0]           n_promoted, n_promote_dropped, n_fam_demand, n_fam_prefetch;

  cxl_pool_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    #(20_000_000 * RUN_SCALE);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- phase settings
  int  fam_lat = 30, fam_ready_pct = 90;
  bit  traffic = 0;

  // ---------------- LLC models
  bit          busy   [NODES][32];
  logic [47:0] rd_blk [NODES][32];
  logic [47:0] sp     [NODES];                 // stream pointer
  logic [47:0] recent [NODES][$];              // recently read lines
  logic [47:0] hitl   [NODES][$];              // lines lately served by the DRAM cache
  logic [47:0] rd_adr [NODES][32];
  bit          pf_got [NODES][logic [47:0]];   // blocks received as DC prefetch
  int          n_reads = 0, n_rsp = 0, n_wb = 0, n_hit_rsp = 0;

  function automatic logic [47:0] new_page(int n);
    return {4'(n + 1), 24'($urandom), 8'h00, 12'h000};
  endfunction

  function automatic int free_id(int n);
    int c[$];
    for (int i = 0; i < 32; i++) if (!busy[n][i]) c.push_back(i);
    return (c.size() == 0) ? -1 : c[$urandom_range(c.size() - 1)];
  endfunction

  // requests, responses: handshakes are sampled at the rising edge
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      if (llc_req_valid[n] && llc_req_ready[n]) begin
        if (llc_req[n].op == LLC_RD) begin
          check(!busy[n][llc_req[n].id], "LLC id reused while busy");
          busy[n][llc_req[n].id] = 1;
          rd_blk[n][llc_req[n].id] = llc_req[n].addr >> BLK_OFF;
          rd_adr[n][llc_req[n].id] = llc_req[n].addr;
          n_reads++;
        end else n_wb++;
      end
      if (llc_rsp_valid[n] && llc_rsp_ready[n]) begin
        int id;
        id = llc_rsp[n].id;
        check(id < 32 && busy[n][id], $sformatf("node %0d response for id %0d not outstanding", n, id));
        if (id < 32) begin
          busy[n][id] = 0;
          if (llc_rsp[n].from_dc) begin
            n_hit_rsp++;
            hitl[n].push_back(rd_adr[n][id]);
            if (hitl[n].size() > 16) void'(hitl[n].pop_front());
            check(pf_got[n].exists(rd_blk[n][id]), $sformatf("node %0d DRAM-cache hit on block %h never prefetched", n, rd_blk[n][id]));
          end
        end
        n_rsp++;
      end
    end
  end

  // new LLC requests, driven after the falling edge
  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      if (llc_req_valid[n] && llc_req_ready[n]) llc_req_valid[n] = 0;
      llc_rsp_ready[n] = ($urandom_range(99) < 90);
      if (!llc_req_valid[n] && traffic && $urandom_range(99) < 35) begin
        int k, id;
        llc_req_t r;
        k = $urandom_range(99);
        r = '0;
        if (k < 12 && recent[n].size() != 0) begin
          // writeback of a line read before, or of a line just ahead
          r.op   = LLC_WB;
          case ($urandom_range(2))
            0: r.addr = recent[n][$urandom_range(recent[n].size() - 1)];
            1: r.addr = sp[n] + 48'(64 * $urandom_range(4, 12));
            default: r.addr = (hitl[n].size() != 0) ? hitl[n][$urandom_range(hitl[n].size() - 1)]
                                                    : recent[n][0];
          endcase
          llc_req[n] = r;
          llc_req_valid[n] = 1;
        end else begin
          id = free_id(n);
          if (id >= 0) begin
            r.op = LLC_RD;
            r.id = 8'(id);
            if (k < 75) begin
              sp[n] = sp[n] + 48'd64;
              if (sp[n][11:0] == 0) sp[n] = new_page(n);
              r.addr = sp[n];
            end else if (k < 93 && recent[n].size() != 0) begin
              r.addr = recent[n][$urandom_range(recent[n].size() - 1)];
            end else begin
              r.addr = new_page(n) | 48'(64 * $urandom_range(63));
              r.core_pf = ($urandom_range(1) == 0);
            end
            recent[n].push_back(r.addr);
            if (recent[n].size() > 24) void'(recent[n].pop_front());
            llc_req[n] = r;
            llc_req_valid[n] = 1;
          end
        end
      end
    end
  end

  // ---------------- local memory controllers
  typedef struct { longint due; lmem_rsp_t r; } lm_ent_t;
  lm_ent_t lmq [NODES][$];
  int      n_lm_fill = 0, n_lm_evict = 0;

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      if (lm_req_valid[n] && lm_req_ready[n]) begin
        check(lm_req[n].addr >= DC_BASE && lm_req[n].addr < DC_BASE + 48'(DC_BYTES),
              $sformatf("node %0d local access %h outside the DRAM cache", n, lm_req[n].addr));
        if (lm_req[n].op == LM_PROXY_RD) lmq[n].push_back('{cyc + 8, '{id: lm_req[n].id}});
        if (lm_req[n].op == LM_FILL) n_lm_fill++;
        if (lm_req[n].op == LM_EVICT_RD) n_lm_evict++;
      end
      if (lm_rsp_valid[n] && lm_rsp_ready[n]) void'(lmq[n].pop_front());
    end
  end

  always @(negedge clk) begin
    for (int n = 0; n < NODES; n++) begin
      lm_req_ready[n] = ($urandom_range(99) < 80);
      lm_rsp_valid[n] = (lmq[n].size() != 0) && (lmq[n][0].due <= cyc);
      if (lm_rsp_valid[n]) lm_rsp[n] = lmq[n][0].r;
    end
  end

  // ---------------- FAM device
  typedef struct { longint due; s2m_rsp_t r; } fam_ent_t;
  fam_ent_t famq[$];
  int       n_fam_rd = 0, n_fam_wr = 0, n_fam_bp = 0;

  always @(posedge clk) if (rst_n) begin
    if (fam_req_valid && fam_req_ready) begin
      check(fam_req.opc != M2S_PROMOTE, "promotion reached the device");
      check(int'(fam_req.node) < NODES, "node number");
      if (fam_req.opc == M2S_MEM_RD) begin
        famq.push_back('{cyc + fam_lat, '{pf_hint: fam_req.pf_hint, dc_block: fam_req.dc_block,
                                         addr: fam_req.addr, tag: fam_req.tag, node: fam_req.node}});
        n_fam_rd++;
      end else n_fam_wr++;
    end
    if (fam_rsp_valid && fam_rsp_ready) begin
      void'(famq.pop_front());
      if (fam_rsp.pf_hint && fam_rsp.dc_block)
        pf_got[fam_rsp.node][fam_rsp.addr >> BLK_OFF] = 1;
    end
    for (int n = 0; n < NODES; n++)
      if (dut.link_req_valid[n] && !dut.link_req_ready[n]) n_fam_bp++;
  end

  always @(negedge clk) begin
    fam_req_ready = ($urandom_range(99) < fam_ready_pct);
    fam_rsp_valid = (famq.size() != 0) && (famq[0].due <= cyc);
    if (fam_rsp_valid) fam_rsp = famq[0].r;
  end

  // ---------------- mechanism observation
  int  n_cong = 0, n_wfq_d = 0, n_wfq_p = 0;
  int  min_rate = 1 << 16;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      if (congested[n]) n_cong++;
      if (bwa_enable && int'(pf_rate[n]) < min_rate) min_rate = pf_rate[n];
    end
    if (dut.u_fam.iss_d && !dut.u_fam.pq_empty) n_wfq_d++;
    if (dut.u_fam.iss_p && !dut.u_fam.dq_empty) n_wfq_p++;
  end

  function automatic int total(int field);
    int s;
    s = 0;
    for (int n = 0; n < NODES; n++)
      case (field)
        0: s += stats[n].dc_hit;            1: s += stats[n].dc_miss;
        2: s += stats[n].wb_hit;            3: s += stats[n].pf_issued;
        4: s += stats[n].pf_drop_redundant; 5: s += stats[n].pf_drop_queue;
        6: s += stats[n].pf_drop_throttle;  7: s += stats[n].pf_wait;
        8: s += stats[n].fill;              9: s += stats[n].evict_dirty;
        default: s += stats[n].stale_drop;
      endcase
    return s;
  endfunction

  task automatic need(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
    $display("  %-34s %0d", what, count);
  endtask

  task automatic report(input int count, input string what);
    $display("  %-34s %0d (reported only)", what, count);
  endtask

  // ---------------- test sequence
  initial begin
    for (int n = 0; n < NODES; n++) sp[n] = new_page(n);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4200) @(negedge clk);   // metadata initialisation, one set per cycle
    // non-adaptive prefetching, fast FAM
    traffic = 1; bwa_enable = 0; fam_lat = 30; fam_ready_pct = 90;
    repeat (4000 * RUN_SCALE) @(negedge clk);
    // non-adaptive, slow FAM: only the prefetch queue limits prefetching
    fam_lat = 200; fam_ready_pct = 30;
    repeat (3000 * RUN_SCALE) @(negedge clk);
    // adaptive, fast FAM
    fam_lat = 30; fam_ready_pct = 90;
    bwa_enable = 1;
    repeat (12288 * RUN_SCALE) @(negedge clk);
    // slow, contended FAM
    fam_lat = 200; fam_ready_pct = 30;
    repeat (24576 * RUN_SCALE) @(negedge clk);
    // fast again
    fam_lat = 30; fam_ready_pct = 90;
    repeat (8192 * RUN_SCALE) @(negedge clk);
    // drain
    traffic = 0;
    repeat (3000) @(negedge clk);
    begin
      int left;
      left = 0;
      for (int n = 0; n < NODES; n++) for (int i = 0; i < 32; i++) left += busy[n][i];
      check(left == 0, $sformatf("%0d reads never answered", left));
      check(llc_req_valid == '0 && famq.size() == 0, "drained");
      check(n_rsp == n_reads && n_reads > 1000, $sformatf("reads %0d responses %0d", n_reads, n_rsp));
      check(total(0) + total(7) + total(1) <= n_reads, "read classification counts");
    end
    $display("reads=%0d writebacks=%0d responses_from_dram_cache=%0d fam_rd=%0d fam_wr=%0d",
             n_reads, n_wb, n_hit_rsp, n_fam_rd, n_fam_wr);
    $display("mechanisms:");
    need(total(0), "DRAM-cache hit");
    need(total(1), "DRAM-cache miss to FAM");
    need(total(2), "writeback hit in DRAM cache");
    need(total(3), "DRAM-cache prefetch issued");
    need(total(4), "prefetch dropped: redundant");
    report(total(5), "prefetch dropped: queue threshold");
    need(total(6), "prefetch dropped: bandwidth throttle");
    need(total(7), "demand waited on in-flight prefetch");
    need(int'(n_promoted), "promotion to demand queue");
    need(int'(n_promote_dropped), "promotion dropped (already issued)");
    need(total(8), "prefetched block filled");
    report(total(9), "dirty victim written back");
    need(total(10), "stale prefetch discarded");
    need(n_cong, "congestion detected (node-cycles)");
    need((min_rate < 4 * 256) ? 1 : 0, "prefetch rate cut");
    need(n_wfq_d, "WFQ demand issued over waiting prefetch");
    need(n_wfq_p, "WFQ prefetch issued over waiting demand");
    need(n_fam_bp, "FAM controller back-pressure");
    need(n_lm_fill, "fill write to local memory");
    report(n_lm_evict, "victim read from local memory");
    check(total(8) == n_lm_fill && total(9) == n_lm_evict, "fill and eviction counts agree");
    $display("minimum prefetch rate %0d/256", min_rate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
