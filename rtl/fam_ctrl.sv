// Prefetch-aware FAM controller at the memory node.
//
// Requests from NODES root complexes arrive as CXL.mem style messages. One is
// taken per cycle, round robin over the nodes whose request its queue can
// take now, and sorted by its prefetch mark: demand reads and writes (dirty
// DRAM-cache victims included) enter the demand queue; core prefetches and
// DRAM-cache prefetches enter the prefetch queue. A promotion message names
// the block of a prefetch that a demand is now waiting for: if that prefetch
// still waits in the prefetch queue it is moved to the tail of the demand
// queue, otherwise the promotion is dropped.
//
// Requests leave for the FAM device at the rate its channels can serve: a
// slot opens every ISSUE_INTERVAL cycles per 64 B moved, so a 256 B block
// holds the next slot back four times as long. In each slot the deficit
// weighted round robin (wfq_sched) chooses the queue. The completions of the
// device are routed back to the node named in them.
//
// The two queues, the promotion and the DWRR choice follow the design
// description. The queue depths, the round-robin intake and the slot spacing
// are this design's choices: two DDR4-2400 channels move 38.4 GB/s, one 64 B
// line per 1.67 ns, so 2 cycles per 64 B fits a 1.2 GHz controller clock.
// All channels are valid/ready; a request taken in cycle t can leave in t+1.
module fam_ctrl
  import cxl_dc_pkg::*;
#(
  parameter int unsigned NODES          = 4,
  parameter int unsigned DQ_DEPTH       = 32,
  parameter int unsigned PQ_DEPTH       = 32,
  parameter int unsigned ISSUE_INTERVAL = 2,
  parameter int unsigned DC_BLK_OFF     = 8,   // 256 B DRAM-cache block
  parameter int unsigned W              = 2    // WFQ demand weight
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // from the root complexes
  input  logic     [NODES-1:0]   req_valid,
  output logic     [NODES-1:0]   req_ready,
  input  m2s_req_t [NODES-1:0]   req,
  // to the FAM device
  output logic                   dev_req_valid,
  input  logic                   dev_req_ready,
  output m2s_req_t               dev_req,
  // completions from the FAM device
  input  logic                   dev_rsp_valid,
  output logic                   dev_rsp_ready,
  input  s2m_rsp_t               dev_rsp,
  // completions to the root complexes
  output logic     [NODES-1:0]   rsp_valid,
  input  logic     [NODES-1:0]   rsp_ready,
  output s2m_rsp_t               rsp,
  // statistics
  output logic [31:0]            n_promoted,
  output logic [31:0]            n_promote_dropped,
  output logic [31:0]            n_demand_issued,
  output logic [31:0]            n_prefetch_issued
);

  localparam int unsigned NW     = clog2c(NODES);
  localparam int unsigned RATIO  = 1 << (DC_BLK_OFF - LINE_OFF);
  localparam int unsigned TW     = 16;

  // ---------------- intake arbitration
  // only requests that their queue can take this cycle compete, so a full
  // prefetch queue never holds back a demand of another node
  logic [NW-1:0]    rr;
  logic             sel_v;
  logic [NW-1:0]    sel;
  logic [NODES-1:0] can_take;
  logic             dq_room, pq_room, promote_ok;

  always_comb begin
    for (int n = 0; n < NODES; n++)
      can_take[n] = (req[n].opc == M2S_PROMOTE) ? promote_ok
                  : req[n].pf_hint ? pq_room : dq_room;
    sel_v = 1'b0;
    sel   = '0;
    for (int j = NODES - 1; j >= 0; j--) begin
      int unsigned n;
      n = (int'(rr) + j) % NODES;
      if (req_valid[n] && can_take[n]) begin
        sel_v = 1'b1;
        sel   = NW'(n);
      end
    end
  end

  m2s_req_t in;
  assign in = req[sel];
  wire in_promote = sel_v && (in.opc == M2S_PROMOTE);
  wire in_pf      = sel_v && !in_promote && in.pf_hint;
  wire in_dem     = sel_v && !in_promote && !in.pf_hint;

  // ---------------- queues
  logic     dq_push, dq_pop, dq_empty, dq_full;
  m2s_req_t dq_wdata, dq_head;
  logic [$clog2(DQ_DEPTH+1)-1:0] dq_count;

  sync_fifo #(.T(m2s_req_t), .DEPTH(DQ_DEPTH)) u_dq (
    .clk, .rst_n, .push(dq_push), .wr_data(dq_wdata), .pop(dq_pop),
    .rd_data(dq_head), .empty(dq_empty), .full(dq_full), .count(dq_count)
  );

  logic     pq_push, pq_pop, pq_remove, pq_empty, pq_full, pq_hit;
  logic [$clog2(PQ_DEPTH)-1:0]   pq_hit_idx;
  logic [$clog2(PQ_DEPTH+1)-1:0] pq_count;
  m2s_req_t pq_head, pq_hit_data;

  search_queue #(.T(m2s_req_t), .K(paddr_t), .DEPTH(PQ_DEPTH)) u_pq (
    .clk, .rst_n, .push(pq_push), .wr_data(in), .wr_key(in.addr),
    .pop(pq_pop), .remove(pq_remove), .remove_idx(pq_hit_idx),
    .search_key(in.addr), .search_hit(pq_hit), .search_idx(pq_hit_idx),
    .search_data(pq_hit_data), .head(pq_head), .empty(pq_empty), .full(pq_full),
    .count(pq_count)
  );

  // ---------------- issue slots and WFQ
  logic [TW-1:0] timer;
  logic          out_v;
  m2s_req_t      out_q;
  wire           out_free = !out_v || dev_req_ready;
  wire           slot     = (timer == '0) && out_free && (!dq_empty || !pq_empty);
  logic          iss_d, iss_p;

  wfq_sched #(.W(W), .QUANTUM(RATIO), .MAX_DEM_DEF(2 * RATIO), .MAX_PF_DEF(2 * RATIO)) u_wfq (
    .clk, .rst_n, .slot,
    .dq_nonempty(!dq_empty), .pq_nonempty(!pq_empty),
    .pq_ratio(pq_head.dc_block ? 4'(RATIO) : 4'd1),
    .issue_demand(iss_d), .issue_prefetch(iss_p),
    .round(), .demand_deficit(), .prefetch_deficit()
  );

  assign dq_pop = iss_d;
  assign pq_pop = iss_p;

  // ---------------- intake decisions
  // a promotion needs the prefetch queue's removal port, which an issued
  // prefetch uses too: it waits for a cycle without a prefetch issue
  assign dq_room    = !dq_full || iss_d;
  assign pq_room    = !pq_full || iss_p;
  assign promote_ok = !iss_p && dq_room;
  wire   accept     = sel_v;

  assign pq_push   = accept && in_pf;
  assign pq_remove = accept && in_promote && pq_hit;
  assign dq_push   = accept && (in_dem || (in_promote && pq_hit));
  assign dq_wdata  = in_dem ? in : pq_hit_data;

  always_comb begin
    req_ready = '0;
    req_ready[sel] = accept;
  end

  // ---------------- output register and slot timer
  m2s_req_t iss_req;
  assign iss_req = iss_d ? dq_head : pq_head;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr    <= '0;
      timer <= '0;
      out_v <= 1'b0;
      out_q <= '0;
      n_promoted <= '0;
      n_promote_dropped <= '0;
      n_demand_issued <= '0;
      n_prefetch_issued <= '0;
    end else begin
      if (accept) rr <= (sel == NW'(NODES - 1)) ? '0 : sel + 1'b1;
      if (accept && in_promote) begin
        if (pq_hit) n_promoted <= n_promoted + 1;
        else n_promote_dropped <= n_promote_dropped + 1;
      end
      if (iss_d || iss_p) begin
        out_v <= 1'b1;
        out_q <= iss_req;
        timer <= TW'(ISSUE_INTERVAL * (iss_req.dc_block ? RATIO : 1) - 1);
        if (iss_d) n_demand_issued <= n_demand_issued + 1;
        else n_prefetch_issued <= n_prefetch_issued + 1;
      end else begin
        if (dev_req_ready) out_v <= 1'b0;
        if (timer != '0) timer <= timer - 1'b1;
      end
    end
  end

  assign dev_req_valid = out_v;
  assign dev_req       = out_q;

  // ---------------- completions back to the nodes
  always_comb begin
    rsp_valid = '0;
    rsp_valid[dev_rsp.node] = dev_rsp_valid;
  end
  assign rsp           = dev_rsp;
  assign dev_rsp_ready = rsp_ready[dev_rsp.node];

  a_issue_one: assert property (@(posedge clk) disable iff (!rst_n) !(iss_d && iss_p));

endmodule
