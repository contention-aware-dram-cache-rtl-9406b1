// Pooled-memory system: NODES compute nodes sharing one FAM node over CXL.mem.
//
// Each compute node has an enhanced root complex (DRAM-cache prefetching with
// bandwidth adaptation); the FAM node has the prefetch-aware FAM controller
// (separate demand and prefetch queues, weighted fair queuing, promotion).
// The processors with their caches, the local memory controllers with the
// DRAM-cache region, and the FAM DDR device are outside: their channels are
// the ports of this module, one entry per node in the arrays. The CXL link of
// each node is a direct valid/ready connection.
//
// Defaults: four nodes, 256 B DRAM-cache blocks, 16 MiB DRAM cache and a
// 256-entry prefetch queue per node, WFQ weight 2.
module cxl_pool_top
  import cxl_dc_pkg::*;
#(
  parameter int unsigned     NODES         = 4,
  parameter int unsigned     BLK_OFF       = 8,
  parameter int unsigned     PQ_DEPTH      = 256,
  parameter longint unsigned DC_BYTES      = 64'd16777216,
  parameter int unsigned     DC_WAYS       = 16,
  parameter int unsigned     DEGREE        = 4,
  parameter int unsigned     SAMPLE_CYCLES = 4096,
  parameter int unsigned     WFQ_WEIGHT    = 2,
  parameter int unsigned     FAM_Q_DEPTH   = 32,
  parameter int unsigned     ISSUE_INTERVAL = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    bwa_enable,
  // LLC of each node (FAM-bound misses and writebacks)
  input  logic      [NODES-1:0]   llc_req_valid,
  output logic      [NODES-1:0]   llc_req_ready,
  input  llc_req_t  [NODES-1:0]   llc_req,
  output logic      [NODES-1:0]   llc_rsp_valid,
  input  logic      [NODES-1:0]   llc_rsp_ready,
  output llc_rsp_t  [NODES-1:0]   llc_rsp,
  // local memory controller of each node
  output logic      [NODES-1:0]   lm_req_valid,
  input  logic      [NODES-1:0]   lm_req_ready,
  output lmem_req_t [NODES-1:0]   lm_req,
  input  logic      [NODES-1:0]   lm_rsp_valid,
  output logic      [NODES-1:0]   lm_rsp_ready,
  input  lmem_rsp_t [NODES-1:0]   lm_rsp,
  // FAM device
  output logic                    fam_req_valid,
  input  logic                    fam_req_ready,
  output m2s_req_t                fam_req,
  input  logic                    fam_rsp_valid,
  output logic                    fam_rsp_ready,
  input  s2m_rsp_t                fam_rsp,
  // observation
  output rc_stats_t [NODES-1:0]   stats,
  output logic [NODES-1:0][15:0]  pf_rate,
  output logic      [NODES-1:0]   congested,
  output logic [31:0]             n_promoted,
  output logic [31:0]             n_promote_dropped,
  output logic [31:0]             n_fam_demand,
  output logic [31:0]             n_fam_prefetch
);

  logic     [NODES-1:0] link_req_valid, link_req_ready, link_rsp_valid, link_rsp_ready;
  m2s_req_t [NODES-1:0] link_req;
  s2m_rsp_t             link_rsp;

  for (genvar n = 0; n < NODES; n++) begin : g_node
    enhanced_root_complex #(
      .NODE_ID(n), .BLK_OFF(BLK_OFF), .PQ_DEPTH(PQ_DEPTH), .DC_BYTES(DC_BYTES),
      .DC_WAYS(DC_WAYS), .DEGREE(DEGREE), .SAMPLE_CYCLES(SAMPLE_CYCLES)
    ) u_rc (
      .clk, .rst_n, .bwa_enable,
      .llc_req_valid(llc_req_valid[n]), .llc_req_ready(llc_req_ready[n]), .llc_req(llc_req[n]),
      .llc_rsp_valid(llc_rsp_valid[n]), .llc_rsp_ready(llc_rsp_ready[n]), .llc_rsp(llc_rsp[n]),
      .lm_req_valid(lm_req_valid[n]), .lm_req_ready(lm_req_ready[n]), .lm_req(lm_req[n]),
      .lm_rsp_valid(lm_rsp_valid[n]), .lm_rsp_ready(lm_rsp_ready[n]), .lm_rsp(lm_rsp[n]),
      .link_req_valid(link_req_valid[n]), .link_req_ready(link_req_ready[n]),
      .link_req(link_req[n]),
      .link_rsp_valid(link_rsp_valid[n]), .link_rsp_ready(link_rsp_ready[n]),
      .link_rsp(link_rsp),
      .stats(stats[n]), .pf_rate(pf_rate[n]), .congested(congested[n])
    );
  end

  fam_ctrl #(
    .NODES(NODES), .DQ_DEPTH(FAM_Q_DEPTH), .PQ_DEPTH(FAM_Q_DEPTH),
    .ISSUE_INTERVAL(ISSUE_INTERVAL), .DC_BLK_OFF(BLK_OFF), .W(WFQ_WEIGHT)
  ) u_fam (
    .clk, .rst_n,
    .req_valid(link_req_valid), .req_ready(link_req_ready), .req(link_req),
    .dev_req_valid(fam_req_valid), .dev_req_ready(fam_req_ready), .dev_req(fam_req),
    .dev_rsp_valid(fam_rsp_valid), .dev_rsp_ready(fam_rsp_ready), .dev_rsp(fam_rsp),
    .rsp_valid(link_rsp_valid), .rsp_ready(link_rsp_ready), .rsp(link_rsp),
    .n_promoted, .n_promote_dropped,
    .n_demand_issued(n_fam_demand), .n_prefetch_issued(n_fam_prefetch)
  );

endmodule
