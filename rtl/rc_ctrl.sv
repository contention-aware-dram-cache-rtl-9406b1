// Request-flow controller of the enhanced root complex.
//
// It sequences, one at a time, every event that reaches the root complex:
//
//   LLC read    look up the DRAM-cache metadata. On a hit a proxy read goes to
//               the local memory controller at the block's DRAM location and
//               its completion is returned to the LLC. On a miss the read goes
//               to FAM, unless a prefetch of the same block is in flight: then
//               the read waits in that prefetch-queue slot and a promotion is
//               sent so the FAM controller can move the prefetch ahead. Hit or
//               miss, the address then trains the prefetcher.
//   LLC write   (writeback) a metadata hit sets the dirty bit and the line is
//               written into the DRAM cache; a miss writes to FAM and marks a
//               matching in-flight prefetch stale.
//   candidate   a prefetch address from the prefetcher is dropped when it is
//               already in the prefetch queue or in the DRAM cache, when the
//               queue is at its threshold, or when bandwidth adaptation
//               withholds credit; otherwise it takes a queue slot and leaves,
//               tagged with the slot number, as a DRAM-cache prefetch.
//   prefetch    the slot is released; unless stale the block is installed in
//   response    the metadata (a dirty victim is read from the DRAM cache and
//               written to FAM first), the data is written into its DRAM
//               location, and a waiting demand gets a proxy read.
//   FAM read    demand and core-prefetch data go back to the LLC.
//
// Priority when several are pending: FAM completions, local-memory
// completions, LLC requests, prefetch candidates. The flow and the checks
// follow the design description; serialising them in one state machine, the
// priority order, the single waiter per prefetch (a second demand for the
// same block simply reads FAM) and the proxy address of a waiting demand
// (the block base) are this design's choices. All channels are valid/ready.
module rc_ctrl
  import cxl_dc_pkg::*;
#(
  parameter int unsigned BLK_OFF  = 8,
  parameter int unsigned PQ_DEPTH = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  // LLC
  input  logic      llc_req_valid,
  output logic      llc_req_ready,
  input  llc_req_t  llc_req,
  output logic      llc_rsp_valid,
  input  logic      llc_rsp_ready,
  output llc_rsp_t  llc_rsp,
  // prefetcher
  output logic      train_valid,
  input  logic      train_ready,
  output paddr_t    train_addr,
  input  logic      cand_valid,
  output logic      cand_ready,
  input  paddr_t    cand_addr,
  // prefetch queue
  output logic                         pq_alloc_valid,
  output logic [PADDR_W-BLK_OFF-1:0]   pq_alloc_blk,
  input  logic [clog2c(PQ_DEPTH)-1:0]  pq_alloc_idx,
  input  logic                         pq_can_alloc,
  output logic [PADDR_W-BLK_OFF-1:0]   pq_search_blk,
  input  logic                         pq_search_hit,
  input  logic [clog2c(PQ_DEPTH)-1:0]  pq_search_idx,
  input  logic                         pq_search_waiter,
  output logic                         pq_set_waiter,
  output logic                         pq_set_stale,
  output logic [clog2c(PQ_DEPTH)-1:0]  pq_mark_idx,
  output logic [ID_W-1:0]              pq_waiter_id,
  output logic [clog2c(PQ_DEPTH)-1:0]  pq_rd_idx,
  output logic                         pq_free,
  input  logic [PADDR_W-BLK_OFF-1:0]   pq_rd_blk,
  input  logic                         pq_rd_waiter,
  input  logic [ID_W-1:0]              pq_rd_waiter_id,
  input  logic                         pq_rd_stale,
  // DRAM-cache metadata
  output logic                         md_req_valid,
  input  logic                         md_req_ready,
  output logic [1:0]                   md_op,
  output logic                         md_write,
  output logic [PADDR_W-BLK_OFF-1:0]   md_blk,
  input  logic                         md_rsp_valid,
  input  logic                         md_hit,
  input  paddr_t                       md_dc_addr,
  input  logic                         md_evict_dirty,
  input  logic [PADDR_W-BLK_OFF-1:0]   md_evict_blk,
  // bandwidth adaptation
  input  logic      pf_allow,
  output logic      ev_demand_total,
  output logic      ev_demand_issued,
  output logic      ev_demand_returned,
  output logic      ev_prefetch_issued,
  // agent (FAM)
  output logic      fam_req_valid,
  input  logic      fam_req_ready,
  output fam_req_t  fam_req,
  input  logic      fam_rsp_valid,
  output logic      fam_rsp_ready,
  input  fam_rsp_t  fam_rsp,
  // local memory controller
  output logic      lm_req_valid,
  input  logic      lm_req_ready,
  output lmem_req_t lm_req,
  input  logic      lm_rsp_valid,
  output logic      lm_rsp_ready,
  input  lmem_rsp_t lm_rsp,
  // statistics
  output rc_stats_t stats
);

  localparam int unsigned BW = PADDR_W - BLK_OFF;
  localparam int unsigned IW = clog2c(PQ_DEPTH);
  localparam logic [1:0] MD_LOOKUP = 2'd0, MD_PROBE = 2'd1, MD_FILL = 2'd2;

  typedef enum logic [4:0] {
    S_IDLE, S_LLC_RSP,
    S_LLC_MD, S_LLC_MDW, S_PROXY, S_FAM_REQ, S_TRAIN,
    S_PF_CHK, S_PF_MDW, S_PF_SEND,
    S_PF_RSP, S_PF_FILLW, S_EVICT_RD, S_EVICT_WR, S_FILL, S_WAITER_RD
  } state_e;
  state_e st;

  llc_req_t        req_q;        // LLC request being handled
  logic [BW-1:0]   blk_q;        // block of a candidate or a prefetch response
  logic [IW-1:0]   slot_q;       // prefetch-queue slot
  paddr_t          dc_addr_q;    // DRAM location found by the metadata
  logic [BW-1:0]   evict_blk_q;
  logic            waiter_q;
  logic [ID_W-1:0] waiter_id_q;
  fam_req_t        fam_q;        // FAM request to send
  logic            after_train;  // read: train the prefetcher afterwards
  llc_rsp_t        rsp_q;

  wire [BW-1:0] req_blk = req_q.addr[PADDR_W-1:BLK_OFF];
  wire          req_rd  = (req_q.op == LLC_RD);

  // ---- event selection in IDLE
  wire take_fam = (st == S_IDLE) && fam_rsp_valid;
  wire take_lm  = (st == S_IDLE) && !fam_rsp_valid && lm_rsp_valid;
  wire take_llc = (st == S_IDLE) && !fam_rsp_valid && !lm_rsp_valid && llc_req_valid;
  wire take_cnd = (st == S_IDLE) && !fam_rsp_valid && !lm_rsp_valid && !llc_req_valid && cand_valid;

  assign fam_rsp_ready = take_fam;
  assign lm_rsp_ready  = take_lm;
  assign llc_req_ready = take_llc;
  assign cand_ready    = take_cnd;

  // ---- outputs of the states
  assign llc_rsp_valid = (st == S_LLC_RSP);
  assign llc_rsp       = rsp_q;

  assign train_valid = (st == S_TRAIN);
  assign train_addr  = req_q.addr;

  assign pq_search_blk = (st == S_PF_CHK) ? blk_q : req_blk;
  assign pq_alloc_blk  = blk_q;
  assign pq_rd_idx     = slot_q;
  assign pq_waiter_id  = req_q.id;
  assign pq_mark_idx   = pq_search_idx;

  wire llc_md_done = (st == S_LLC_MDW) && md_rsp_valid;
  wire pf_md_done  = (st == S_PF_MDW) && md_rsp_valid;

  assign pq_set_waiter  = llc_md_done && req_rd && !md_hit && pq_search_hit && !pq_search_waiter;
  assign pq_set_stale   = llc_md_done && !req_rd && !md_hit && pq_search_hit;
  assign pq_alloc_valid = pf_md_done && !md_hit && pq_can_alloc && pf_allow;
  assign pq_free        = (st == S_PF_RSP) && (pq_rd_stale || md_req_ready);

  always_comb begin
    md_req_valid = 1'b0;
    md_op        = MD_LOOKUP;
    md_write     = 1'b0;
    md_blk       = req_blk;
    unique case (st)
      S_LLC_MD: begin md_req_valid = 1'b1; md_op = MD_LOOKUP; md_write = !req_rd; end
      S_PF_CHK: begin md_req_valid = !pq_search_hit; md_op = MD_PROBE; md_blk = blk_q; end
      S_PF_RSP: begin md_req_valid = !pq_rd_stale; md_op = MD_FILL; md_blk = pq_rd_blk; end
      default: ;
    endcase
  end

  always_comb begin
    lm_req_valid = 1'b0;
    lm_req       = '{op: LM_PROXY_RD, addr: dc_addr_q, id: req_q.id};
    unique case (st)
      S_PROXY: begin
        lm_req_valid = 1'b1;
        lm_req.op    = req_rd ? LM_PROXY_RD : LM_PROXY_WR;
        lm_req.addr  = dc_addr_q | paddr_t'(req_q.addr[BLK_OFF-1:0]);
      end
      S_EVICT_RD:  begin lm_req_valid = 1'b1; lm_req.op = LM_EVICT_RD; end
      S_FILL:      begin lm_req_valid = 1'b1; lm_req.op = LM_FILL; end
      S_WAITER_RD: begin lm_req_valid = 1'b1; lm_req.op = LM_PROXY_RD; lm_req.id = waiter_id_q; end
      default: ;
    endcase
  end

  always_comb begin
    fam_req_valid = 1'b0;
    fam_req       = fam_q;
    unique case (st)
      S_FAM_REQ: fam_req_valid = 1'b1;
      S_PF_SEND: begin
        fam_req_valid = 1'b1;
        fam_req = '{op: FAM_DC_PF, sub_page: 1'b1, addr: {blk_q, {BLK_OFF{1'b0}}},
                    tag: TAG_W'(slot_q), node: '0};
      end
      S_EVICT_WR: begin
        fam_req_valid = 1'b1;
        fam_req = '{op: FAM_DEM_WR, sub_page: 1'b1, addr: {evict_blk_q, {BLK_OFF{1'b0}}},
                    tag: '0, node: '0};
      end
      default: ;
    endcase
  end

  assign ev_demand_total    = llc_md_done && req_rd && !req_q.core_pf;
  assign ev_demand_issued   = (st == S_FAM_REQ) && fam_req_ready && fam_q.op == FAM_DEM_RD;
  assign ev_demand_returned = take_fam && fam_rsp.op == FAM_DEM_RD;
  assign ev_prefetch_issued = (st == S_PF_SEND) && fam_req_ready;

  // ---- state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      req_q       <= '0;
      blk_q       <= '0;
      slot_q      <= '0;
      dc_addr_q   <= '0;
      evict_blk_q <= '0;
      waiter_q    <= 1'b0;
      waiter_id_q <= '0;
      fam_q       <= '0;
      after_train <= 1'b0;
      rsp_q       <= '0;
      stats       <= '0;
    end else begin
      unique case (st)
        S_IDLE: begin
          if (take_fam) begin
            if (fam_rsp.op == FAM_DC_PF) begin
              slot_q <= IW'(fam_rsp.tag);
              st     <= S_PF_RSP;
            end else begin
              rsp_q <= '{id: ID_W'(fam_rsp.tag), from_dc: 1'b0};
              st    <= S_LLC_RSP;
            end
          end else if (take_lm) begin
            rsp_q <= '{id: lm_rsp.id, from_dc: 1'b1};
            st    <= S_LLC_RSP;
          end else if (take_llc) begin
            req_q <= llc_req;
            st    <= S_LLC_MD;
          end else if (take_cnd) begin
            blk_q <= cand_addr[PADDR_W-1:BLK_OFF];
            st    <= S_PF_CHK;
          end
        end
        S_LLC_RSP: if (llc_rsp_ready) st <= S_IDLE;

        // ---------------- LLC requests
        S_LLC_MD: if (md_req_ready) st <= S_LLC_MDW;
        S_LLC_MDW: if (md_rsp_valid) begin
          dc_addr_q   <= md_dc_addr;
          after_train <= req_rd;
          if (md_hit) begin
            if (req_rd) stats.dc_hit <= stats.dc_hit + 1'b1;
            else        stats.wb_hit <= stats.wb_hit + 1'b1;
            st <= S_PROXY;
          end else if (req_rd && pq_search_hit && !pq_search_waiter) begin
            stats.pf_wait <= stats.pf_wait + 1'b1;
            fam_q <= '{op: FAM_PROMOTE, sub_page: 1'b1, addr: {req_blk, {BLK_OFF{1'b0}}},
                       tag: TAG_W'(pq_search_idx), node: '0};
            st    <= S_FAM_REQ;
          end else begin
            if (req_rd) stats.dc_miss <= stats.dc_miss + 1'b1;
            fam_q <= '{op: !req_rd ? FAM_DEM_WR : (req_q.core_pf ? FAM_CORE_PF : FAM_DEM_RD),
                       sub_page: 1'b0, addr: req_q.addr, tag: TAG_W'(req_q.id), node: '0};
            st    <= S_FAM_REQ;
          end
        end
        S_PROXY:   if (lm_req_ready) st <= after_train ? S_TRAIN : S_IDLE;
        S_FAM_REQ: if (fam_req_ready) st <= after_train ? S_TRAIN : S_IDLE;
        S_TRAIN:   if (train_ready) st <= S_IDLE;

        // ---------------- prefetch candidates
        S_PF_CHK: begin
          if (pq_search_hit) begin
            stats.pf_drop_redundant <= stats.pf_drop_redundant + 1'b1;
            st <= S_IDLE;
          end else if (md_req_ready) st <= S_PF_MDW;
        end
        S_PF_MDW: if (md_rsp_valid) begin
          if (md_hit) begin
            stats.pf_drop_redundant <= stats.pf_drop_redundant + 1'b1;
            st <= S_IDLE;
          end else if (!pq_can_alloc) begin
            stats.pf_drop_queue <= stats.pf_drop_queue + 1'b1;
            st <= S_IDLE;
          end else if (!pf_allow) begin
            stats.pf_drop_throttle <= stats.pf_drop_throttle + 1'b1;
            st <= S_IDLE;
          end else begin
            slot_q <= pq_alloc_idx;
            st     <= S_PF_SEND;
          end
        end
        S_PF_SEND: if (fam_req_ready) begin
          stats.pf_issued <= stats.pf_issued + 1'b1;
          st <= S_IDLE;
        end

        // ---------------- prefetch responses
        S_PF_RSP: begin
          waiter_q    <= pq_rd_waiter;
          waiter_id_q <= pq_rd_waiter_id;
          if (pq_rd_stale) begin
            // the copy is out of date; a demand that waited for it reads FAM
            stats.stale_drop <= stats.stale_drop + 1'b1;
            after_train <= 1'b0;
            fam_q <= '{op: FAM_DEM_RD, sub_page: 1'b0, addr: {pq_rd_blk, {BLK_OFF{1'b0}}},
                       tag: TAG_W'(pq_rd_waiter_id), node: '0};
            st <= pq_rd_waiter ? S_FAM_REQ : S_IDLE;
          end else if (md_req_ready) st <= S_PF_FILLW;
        end
        S_PF_FILLW: if (md_rsp_valid) begin
          dc_addr_q   <= md_dc_addr;
          evict_blk_q <= md_evict_blk;
          st          <= md_evict_dirty ? S_EVICT_RD : S_FILL;
        end
        S_EVICT_RD: if (lm_req_ready) st <= S_EVICT_WR;
        S_EVICT_WR: if (fam_req_ready) begin
          stats.evict_dirty <= stats.evict_dirty + 1'b1;
          st <= S_FILL;
        end
        S_FILL: if (lm_req_ready) begin
          stats.fill <= stats.fill + 1'b1;
          st <= waiter_q ? S_WAITER_RD : S_IDLE;
        end
        S_WAITER_RD: if (lm_req_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
