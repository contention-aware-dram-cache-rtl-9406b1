// Self-checking testbench of enhanced_root_complex, one compute node alone.
//
// The bench stands in for the LLC, the local memory controller and the CXL
// link with the FAM node behind it (a fixed-latency memory answering every
// read). A small configuration keeps the run short: 8 KiB two-way DRAM cache
// of 256 B blocks, an 8-entry prefetch queue, 256-cycle sampling.
//
// Directed part, with adaptation off:
//   * a read miss leaves on the link as a demand read of its line with the
//     LLC identifier as tag and this node's number, and its completion comes
//     back to the LLC marked as not from the DRAM cache;
//   * a line-by-line stream through a page makes the prefetcher send
//     DRAM-cache block prefetches for the blocks ahead of the stream, marked
//     as prefetch and block transfer, and their completions become fills of
//     the DRAM cache;
//   * a read of a filled block becomes a proxy read of the DRAM-cache
//     location and is answered as a DRAM-cache hit; a writeback of it becomes
//     a proxy write;
//   * a read of a block whose prefetch is still on its way sends a promotion
//     and is answered once the block arrives.
// Random part, with adaptation on: random streams, reuse and writebacks
// under a random link, checking that every read is answered exactly once and
// that DRAM-cache hits only occur for blocks the node prefetched.
module tb_enhanced_root_complex;
  import cxl_dc_pkg::*;

  localparam int          NODE     = 1;
  localparam logic [47:0] DC_BASE  = 48'h0000_4000_0000;
  localparam longint      DC_BYTES = 64'd8192;

  logic      clk = 0, rst_n = 0, bwa_enable = 0;
  logic      llc_req_valid = 0, llc_req_ready, llc_rsp_valid, llc_rsp_ready = 1;
  llc_req_t  llc_req = '0;
  llc_rsp_t  llc_rsp;
  logic      lm_req_valid, lm_req_ready = 1, lm_rsp_valid = 0, lm_rsp_ready;
  lmem_req_t lm_req;
  lmem_rsp_t lm_rsp = '0;
  logic      link_req_valid, link_req_ready = 1, link_rsp_valid = 0, link_rsp_ready;
  m2s_req_t  link_req;
  s2m_rsp_t  link_rsp = '0;
  rc_stats_t stats;
  logic [15:0] pf_rate;
  logic      congested;

  enhanced_root_complex #(
    .NODE_ID(NODE), .BLK_OFF(8), .PQ_DEPTH(8), .DC_BYTES(DC_BYTES), .DC_WAYS(2),
    .DC_BASE(DC_BASE), .DEGREE(4), .SAMPLE_CYCLES(256)
  ) dut (.*);

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
    #5_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- link / FAM model
  typedef struct { longint due; s2m_rsp_t r; } ent_t;
  ent_t        famq[$];
  m2s_req_t    sent[$];            // every message the node sent
  int          fam_lat = 40, link_pct = 100;
  bit          pf_got[logic [47:0]];
  int          n_promote = 0;

  always @(posedge clk) if (rst_n) begin
    if (link_req_valid && link_req_ready) begin
      sent.push_back(link_req);
      check(link_req.node == NODE_W'(NODE), "node number on the link");
      if (link_req.opc == M2S_MEM_RD)
        famq.push_back('{cyc + fam_lat, '{pf_hint: link_req.pf_hint, dc_block: link_req.dc_block,
                                         addr: link_req.addr, tag: link_req.tag, node: link_req.node}});
      if (link_req.opc == M2S_PROMOTE) n_promote++;
    end
    if (link_rsp_valid && link_rsp_ready) begin
      if (link_rsp.pf_hint && link_rsp.dc_block) pf_got[link_rsp.addr >> 8] = 1;
      void'(famq.pop_front());
    end
  end

  always @(negedge clk) begin
    link_req_ready = ($urandom_range(99) < link_pct);
    link_rsp_valid = (famq.size() != 0) && (famq[0].due <= cyc);
    if (link_rsp_valid) link_rsp = famq[0].r;
  end

  // ---------------- local memory model
  typedef struct { longint due; lmem_rsp_t r; } lent_t;
  lent_t     lmq[$];
  lmem_req_t lm_seen[$];

  always @(posedge clk) if (rst_n) begin
    if (lm_req_valid && lm_req_ready) begin
      lm_seen.push_back(lm_req);
      check(lm_req.addr >= DC_BASE && lm_req.addr < DC_BASE + 48'(DC_BYTES), "local access inside the DRAM cache");
      if (lm_req.op == LM_PROXY_RD) lmq.push_back('{cyc + 6, '{id: lm_req.id}});
    end
    if (lm_rsp_valid && lm_rsp_ready) void'(lmq.pop_front());
  end

  always @(negedge clk) begin
    lm_rsp_valid = (lmq.size() != 0) && (lmq[0].due <= cyc);
    if (lm_rsp_valid) lm_rsp = lmq[0].r;
  end

  // ---------------- LLC side
  bit          busy[256];
  logic [47:0] rd_blk[256];
  llc_rsp_t    rsps[$];
  int          n_reads = 0, n_rsp = 0;

  always @(posedge clk) if (rst_n) begin
    if (llc_req_valid && llc_req_ready && llc_req.op == LLC_RD) begin
      check(!busy[llc_req.id], "identifier reused");
      busy[llc_req.id] = 1;
      rd_blk[llc_req.id] = llc_req.addr >> 8;
      n_reads++;
    end
    if (llc_rsp_valid && llc_rsp_ready) begin
      check(busy[llc_rsp.id], $sformatf("response for id %0d not outstanding", llc_rsp.id));
      if (llc_rsp.from_dc) check(pf_got.exists(rd_blk[llc_rsp.id]), "DRAM-cache hit on a block never prefetched");
      busy[llc_rsp.id] = 0;
      rsps.push_back(llc_rsp);
      n_rsp++;
    end
  end

  task automatic send(input llc_op_e op, input logic [47:0] addr, input int id);
    @(negedge clk);
    llc_req = '{op: op, core_pf: 1'b0, addr: addr, id: 8'(id)};
    llc_req_valid = 1;
    do @(posedge clk); while (!llc_req_ready);
    @(negedge clk);
    llc_req_valid = 0;
  endtask

  task automatic wait_rsp(input int id, output llc_rsp_t r);
    int t;
    t = 0;
    while (t < 2000) begin
      foreach (rsps[i]) if (rsps[i].id == 8'(id)) begin
        r = rsps[i];
        rsps.delete(i);
        return;
      end
      @(posedge clk);
      t++;
    end
    check(0, $sformatf("no response for id %0d", id));
    r = '0;
  endtask

  function automatic int count_sent(m2s_opc_e opc, bit pf, logic [47:0] addr);
    int c;
    c = 0;
    foreach (sent[i]) if (sent[i].opc == opc && sent[i].pf_hint == pf && sent[i].addr == addr) c++;
    return c;
  endfunction

  function automatic int count_lm(lmem_op_e op);
    int c;
    c = 0;
    foreach (lm_seen[i]) if (lm_seen[i].op == op) c++;
    return c;
  endfunction

  initial begin
    llc_rsp_t r;
    logic [47:0] pg;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (40) @(negedge clk);   // metadata initialisation

    // 1. a single miss
    send(LLC_RD, 48'h0000_0123_4540, 5);
    wait_rsp(5, r);
    check(!r.from_dc, "miss answered from FAM");
    check(count_sent(M2S_MEM_RD, 0, 48'h0000_0123_4540) == 1, "demand read on the link");
    check(sent[0].tag == 8'd5 && !sent[0].dc_block, "demand tag and size");

    // 2. a stream through one page, block by block, one line per block
    pg = 48'h0000_0777_0000;
    for (int b = 0; b < 6; b++) begin
      send(LLC_RD, pg | 48'(b << 8), 10 + b);
      wait_rsp(10 + b, r);
      repeat (60) @(negedge clk);
    end
    for (int b = 6; b < 10; b++)
      check(count_sent(M2S_MEM_RD, 1, pg | 48'(b << 8)) == 1, $sformatf("block %0d prefetched once", b));
    check(stats.fill >= 4 && count_lm(LM_FILL) == int'(stats.fill), "fills written to local memory");
    foreach (sent[i]) if (sent[i].pf_hint) check(sent[i].dc_block, "prefetch is a block transfer");

    // 3. hits on the prefetched blocks, then a writeback hit
    send(LLC_RD, pg | 48'h640, 30);
    wait_rsp(30, r);
    check(r.from_dc, "block 6 served by the DRAM cache");
    check(count_sent(M2S_MEM_RD, 0, pg | 48'h640) == 0, "no FAM read for the hit");
    send(LLC_WB, pg | 48'h780, 0);
    repeat (20) @(negedge clk);
    check(count_lm(LM_PROXY_WR) == 1 && stats.wb_hit == 1, "writeback absorbed by the DRAM cache");
    check(count_sent(M2S_MEM_WR, 0, pg | 48'h780) == 0, "no FAM write for the hit");

    // 4. a read of a block still in flight: slow FAM, read right behind the stream
    fam_lat = 400;
    pg = 48'h0000_0999_0000;
    for (int b = 0; b < 6; b++) begin
      send(LLC_RD, pg | 48'(b << 8), 40 + b);
      if (b < 5) begin
        wait_rsp(40 + b, r);
        repeat (10) @(negedge clk);
      end
    end
    send(LLC_RD, pg | 48'h600, 50);   // block 6, whose prefetch left with block 5's
    wait_rsp(50, r);
    wait_rsp(45, r);
    check(stats.pf_wait >= 1 && n_promote >= 1, "demand waited and a promotion was sent");
    check(count_sent(M2S_MEM_RD, 0, pg | 48'h600) == 0, "no separate FAM read for the waiting demand");
    fam_lat = 40;

    // 5. random traffic with adaptation on
    bwa_enable = 1;
    link_pct = 60;
    begin
      logic [47:0] sp;
      int id;
      sp = 48'h0000_0aaa_0000;
      for (int i = 0; i < 3000; i++) begin
        id = 100 + (i % 100);
        if (busy[id]) begin
          @(negedge clk);
          continue;
        end
        case ($urandom_range(9))
          0: send(LLC_WB, sp + 48'(64 * $urandom_range(8)), 0);
          1, 2: send(LLC_RD, sp - 48'(64 * $urandom_range(1, 20)), id);
          default: begin
            sp = sp + 48'd64;
            send(LLC_RD, sp, id);
          end
        endcase
      end
    end
    repeat (2000) @(negedge clk);
    begin
      int left;
      left = 0;
      foreach (busy[i]) left += busy[i];
      check(left == 0 && n_rsp == n_reads, $sformatf("reads %0d answered %0d outstanding %0d", n_reads, n_rsp, left));
    end
    check(stats.dc_hit > 0 && stats.pf_issued > 0 && stats.pf_drop_redundant > 0, "random phase mechanisms");
    $display("reads=%0d hits=%0d pf_issued=%0d fills=%0d waits=%0d promotions=%0d throttled=%0d queue_drops=%0d",
             n_reads, stats.dc_hit, stats.pf_issued, stats.fill, stats.pf_wait, n_promote,
             stats.pf_drop_throttle, stats.pf_drop_queue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
