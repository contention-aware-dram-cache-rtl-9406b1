// Enhanced CXL root complex of one compute node.
//
// FAM-bound LLC misses and writebacks enter here. The root complex keeps a
// hardware-managed DRAM cache of FAM data in a reserved region of local DRAM:
// a hit is turned into a proxy request to the local memory controller and
// sees local-memory latency, a miss goes to FAM over CXL.mem. A Signature
// Path Prefetcher trained on the FAM-bound reads proposes sub-page blocks;
// candidates not yet cached or in flight are sent to FAM as tagged prefetches
// while the prefetch queue has room and bandwidth adaptation allows, and the
// returning blocks are installed in the DRAM cache.
//
//   rc_ctrl               request flow (the state machine)
//   spp_prefetcher        prefetch address generation
//   prefetch_queue        in-flight prefetches, 256 slots, 95 % threshold
//   dc_metadata           DRAM-cache tags, dirty, valid and LRU
//   bw_adapt              prefetch issue-rate control from demand latency
//   cxl_agent             CXL.mem message formatting towards the FAM node
//
// bwa_enable = 0 gives the non-adaptive prefetcher (only the queue limits
// prefetching). Parameter defaults are the main configuration: 256 B blocks,
// a 16 MiB DRAM cache, a 256-entry prefetch queue; the other sizes are this
// design's choices (see the submodules).
module enhanced_root_complex
  import cxl_dc_pkg::*;
#(
  parameter int unsigned     NODE_ID       = 0,
  parameter int unsigned     BLK_OFF       = 8,
  parameter int unsigned     PQ_DEPTH      = 256,
  parameter int unsigned     PQ_THRESH_PCT = 95,
  parameter longint unsigned DC_BYTES      = 64'd16777216,
  parameter int unsigned     DC_WAYS       = 16,
  parameter logic [PADDR_W-1:0] DC_BASE    = 48'h0000_4000_0000,
  parameter int unsigned     ST_ENTRIES    = 512,
  parameter int unsigned     PT_ENTRIES    = 1024,
  parameter int unsigned     DEGREE        = 4,
  parameter int unsigned     SAMPLE_CYCLES = 4096
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      bwa_enable,
  // LLC side
  input  logic      llc_req_valid,
  output logic      llc_req_ready,
  input  llc_req_t  llc_req,
  output logic      llc_rsp_valid,
  input  logic      llc_rsp_ready,
  output llc_rsp_t  llc_rsp,
  // local memory controller (DRAM cache region)
  output logic      lm_req_valid,
  input  logic      lm_req_ready,
  output lmem_req_t lm_req,
  input  logic      lm_rsp_valid,
  output logic      lm_rsp_ready,
  input  lmem_rsp_t lm_rsp,
  // CXL.mem link
  output logic      link_req_valid,
  input  logic      link_req_ready,
  output m2s_req_t  link_req,
  input  logic      link_rsp_valid,
  output logic      link_rsp_ready,
  input  s2m_rsp_t  link_rsp,
  // observation
  output rc_stats_t stats,
  output logic [15:0] pf_rate,
  output logic      congested
);

  localparam int unsigned BW = PADDR_W - BLK_OFF;
  localparam int unsigned IW = clog2c(PQ_DEPTH);

  // prefetcher
  logic   train_valid, train_ready, cand_valid, cand_ready;
  paddr_t train_addr, cand_addr;

  spp_prefetcher #(
    .BLK_OFF(BLK_OFF), .ST_ENTRIES(ST_ENTRIES), .PT_ENTRIES(PT_ENTRIES), .DEGREE(DEGREE)
  ) u_spp (
    .clk, .rst_n,
    .train_valid, .train_ready, .train_addr,
    .pf_valid(cand_valid), .pf_ready(cand_ready), .pf_addr(cand_addr)
  );

  // prefetch queue
  logic            pq_alloc_valid, pq_can_alloc, pq_search_hit, pq_search_waiter;
  logic            pq_set_waiter, pq_set_stale, pq_free;
  logic            pq_rd_waiter, pq_rd_stale;
  logic [BW-1:0]   pq_alloc_blk, pq_search_blk, pq_rd_blk;
  logic [IW-1:0]   pq_alloc_idx, pq_search_idx, pq_mark_idx, pq_rd_idx;
  logic [ID_W-1:0] pq_waiter_id, pq_rd_waiter_id;

  prefetch_queue #(.DEPTH(PQ_DEPTH), .THRESH_PCT(PQ_THRESH_PCT), .BLK_OFF(BLK_OFF)) u_pq (
    .clk, .rst_n,
    .alloc_valid(pq_alloc_valid), .alloc_blk(pq_alloc_blk), .alloc_idx(pq_alloc_idx),
    .can_alloc(pq_can_alloc),
    .search_blk(pq_search_blk), .search_hit(pq_search_hit), .search_idx(pq_search_idx),
    .search_waiter(pq_search_waiter),
    .set_waiter(pq_set_waiter), .set_stale(pq_set_stale), .mark_idx(pq_mark_idx),
    .waiter_id(pq_waiter_id),
    .rd_idx(pq_rd_idx), .free_valid(pq_free), .rd_valid(), .rd_blk(pq_rd_blk),
    .rd_waiter(pq_rd_waiter), .rd_waiter_id(pq_rd_waiter_id), .rd_stale(pq_rd_stale),
    .count(), .full()
  );

  // DRAM-cache metadata
  logic          md_req_valid, md_req_ready, md_write, md_rsp_valid, md_hit;
  logic          md_evict_dirty;
  logic [1:0]    md_op;
  logic [BW-1:0] md_blk, md_evict_blk;
  paddr_t        md_dc_addr;

  dc_metadata #(.DC_BYTES(DC_BYTES), .BLK_OFF(BLK_OFF), .WAYS(DC_WAYS), .DC_BASE(DC_BASE)) u_md (
    .clk, .rst_n,
    .req_valid(md_req_valid), .req_ready(md_req_ready), .req_op(md_op),
    .req_write(md_write), .req_blk(md_blk),
    .rsp_valid(md_rsp_valid), .rsp_hit(md_hit), .rsp_dc_addr(md_dc_addr),
    .rsp_evict(), .rsp_evict_dirty(md_evict_dirty), .rsp_evict_blk(md_evict_blk)
  );

  // bandwidth adaptation
  logic pf_allow, ev_total, ev_issued, ev_returned, ev_pf;

  bw_adapt #(.SAMPLE_CYCLES(SAMPLE_CYCLES), .DEGREE(DEGREE)) u_bwa (
    .clk, .rst_n, .enable(bwa_enable),
    .ev_demand_total(ev_total), .ev_demand_issued(ev_issued),
    .ev_demand_returned(ev_returned), .ev_prefetch_issued(ev_pf),
    .pf_allow, .rate(pf_rate), .ppd(), .dpp(), .pgd(), .lat_avg(), .lat_min(),
    .accuracy(), .congested, .sample_done()
  );

  // agent
  logic     fam_req_valid, fam_req_ready, fam_rsp_valid, fam_rsp_ready;
  fam_req_t fam_req;
  fam_rsp_t fam_rsp;

  cxl_agent #(.NODE_ID(NODE_ID)) u_agent (
    .clk, .rst_n,
    .rc_req_valid(fam_req_valid), .rc_req_ready(fam_req_ready), .rc_req(fam_req),
    .link_req_valid, .link_req_ready, .link_req,
    .link_rsp_valid, .link_rsp_ready, .link_rsp,
    .rc_rsp_valid(fam_rsp_valid), .rc_rsp_ready(fam_rsp_ready), .rc_rsp(fam_rsp)
  );

  rc_ctrl #(.BLK_OFF(BLK_OFF), .PQ_DEPTH(PQ_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .llc_req_valid, .llc_req_ready, .llc_req, .llc_rsp_valid, .llc_rsp_ready, .llc_rsp,
    .train_valid, .train_ready, .train_addr, .cand_valid, .cand_ready, .cand_addr,
    .pq_alloc_valid, .pq_alloc_blk, .pq_alloc_idx, .pq_can_alloc,
    .pq_search_blk, .pq_search_hit, .pq_search_idx, .pq_search_waiter,
    .pq_set_waiter, .pq_set_stale, .pq_mark_idx, .pq_waiter_id,
    .pq_rd_idx, .pq_free, .pq_rd_blk, .pq_rd_waiter, .pq_rd_waiter_id, .pq_rd_stale,
    .md_req_valid, .md_req_ready, .md_op, .md_write, .md_blk,
    .md_rsp_valid, .md_hit, .md_dc_addr, .md_evict_dirty, .md_evict_blk,
    .pf_allow, .ev_demand_total(ev_total), .ev_demand_issued(ev_issued),
    .ev_demand_returned(ev_returned), .ev_prefetch_issued(ev_pf),
    .fam_req_valid, .fam_req_ready, .fam_req, .fam_rsp_valid, .fam_rsp_ready, .fam_rsp,
    .lm_req_valid, .lm_req_ready, .lm_req, .lm_rsp_valid, .lm_rsp_ready, .lm_rsp,
    .stats
  );

endmodule
