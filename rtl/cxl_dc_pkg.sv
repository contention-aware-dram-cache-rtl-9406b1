// Shared types and constants for the pooled-memory DRAM-cache prefetching design.
//
// The design works at the level of memory requests: every channel carries an
// address, a request class and an identifier, never the data bytes. Data moves
// with these requests through the LLC, the local memory controller and the FAM
// device, which sit outside this design.
//
// Address sizes follow the 48-bit physical address space the metadata budget
// is computed for; 64-byte CPU lines and 4 KiB pages are the usual host sizes.
// Identifier widths and the encoding of the request classes are this design's
// own choices.
package cxl_dc_pkg;

  localparam int unsigned PADDR_W  = 48;  // physical address bits
  localparam int unsigned LINE_OFF = 6;   // 64 B CPU cache line
  localparam int unsigned PAGE_OFF = 12;  // 4 KiB page
  localparam int unsigned ID_W     = 8;   // LLC request identifier
  localparam int unsigned TAG_W    = 8;   // tag carried on the CXL link
  localparam int unsigned NODE_W   = 2;   // up to four compute nodes

  typedef logic [PADDR_W-1:0] paddr_t;

  // Request from the LLC towards FAM (already decoded as FAM-bound).
  typedef enum logic [0:0] {LLC_RD = 1'b0, LLC_WB = 1'b1} llc_op_e;

  typedef struct packed {
    llc_op_e         op;
    logic            core_pf;  // read miss caused by an L1/L2 prefetch
    paddr_t          addr;
    logic [ID_W-1:0] id;
  } llc_req_t;

  typedef struct packed {
    logic [ID_W-1:0] id;
    logic            from_dc;  // served out of the DRAM cache
  } llc_rsp_t;

  // Request classes seen by the FAM controller. Everything but demand reads
  // and writes is tagged as a prefetch; PROMOTE asks the controller to move a
  // queued prefetch into the demand queue.
  typedef enum logic [2:0] {
    FAM_DEM_RD  = 3'd0,
    FAM_DEM_WR  = 3'd1,
    FAM_CORE_PF = 3'd2,
    FAM_DC_PF   = 3'd3,
    FAM_PROMOTE = 3'd4
  } fam_op_e;

  typedef struct packed {
    fam_op_e          op;
    logic             sub_page;  // transfer is one DRAM-cache block, not one line
    paddr_t           addr;
    logic [TAG_W-1:0] tag;
    logic [NODE_W-1:0] node;
  } fam_req_t;

  typedef struct packed {
    fam_op_e           op;       // class of the request being answered
    paddr_t            addr;
    logic [TAG_W-1:0]  tag;
    logic [NODE_W-1:0] node;
  } fam_rsp_t;

  // Proxy requests into the DRAM-cache region of local memory.
  typedef enum logic [1:0] {
    LM_PROXY_RD = 2'd0,  // demand read served by the DRAM cache
    LM_PROXY_WR = 2'd1,  // LLC writeback that hit the DRAM cache
    LM_FILL     = 2'd2,  // prefetch data written into the DRAM cache
    LM_EVICT_RD = 2'd3   // dirty victim read out before it goes to FAM
  } lmem_op_e;

  typedef struct packed {
    lmem_op_e        op;
    paddr_t          addr;   // local physical address inside the DRAM cache
    logic [ID_W-1:0] id;
  } lmem_req_t;

  typedef struct packed {
    logic [ID_W-1:0] id;     // answers LM_PROXY_RD only
  } lmem_rsp_t;

  // CXL.mem style message leaving a root complex.
  typedef enum logic [1:0] {
    M2S_MEM_RD  = 2'd0,
    M2S_MEM_WR  = 2'd1,
    M2S_PROMOTE = 2'd2
  } m2s_opc_e;

  typedef struct packed {
    m2s_opc_e          opc;
    logic              pf_hint;    // prefetch tag used by the FAM controller
    logic              dc_block;   // sub-page DRAM-cache block transfer
    paddr_t            addr;
    logic [TAG_W-1:0]  tag;
    logic [NODE_W-1:0] node;
  } m2s_req_t;

  // Read completion travelling back from FAM; the prefetch marks of the
  // request are echoed so the root complex can tell fills from demand data.
  typedef struct packed {
    logic              pf_hint;
    logic              dc_block;
    paddr_t            addr;
    logic [TAG_W-1:0]  tag;
    logic [NODE_W-1:0] node;
  } s2m_rsp_t;

  // Event counts of one root complex, kept for observation.
  typedef struct packed {
    logic [15:0] dc_hit;             // LLC read served by the DRAM cache
    logic [15:0] dc_miss;            // LLC read sent to FAM
    logic [15:0] wb_hit;             // LLC writeback absorbed by the DRAM cache
    logic [15:0] pf_issued;          // DRAM-cache prefetch sent to FAM
    logic [15:0] pf_drop_redundant;  // candidate already cached or in flight
    logic [15:0] pf_drop_queue;      // prefetch queue at its threshold
    logic [15:0] pf_drop_throttle;   // refused by bandwidth adaptation
    logic [15:0] pf_wait;            // demand waited for an in-flight prefetch
    logic [15:0] fill;               // prefetched block installed
    logic [15:0] evict_dirty;        // dirty victim written back to FAM
    logic [15:0] stale_drop;         // prefetched copy discarded after a writeback
  } rc_stats_t;

  function automatic int unsigned clog2c(int unsigned v);
    return (v <= 1) ? 1 : $clog2(v);
  endfunction

endpackage
