// Root-complex prefetch queue: the set of DRAM-cache prefetches in flight.
//
// Every prefetch sent to FAM holds one slot from issue until its response
// returns; the slot index travels as the request tag, so the response frees
// the slot directly. Like an MSHR the queue is searched by block address, so
// a demand for a block already being prefetched is recognised. A slot can
// record one waiting demand (its LLC id), served once the block is in the
// DRAM cache, and a stale mark, set when an LLC writeback to the block passed
// it, so the returning copy is not installed.
//
// New prefetches are refused when the queue is full or its occupancy has
// reached THRESH_PCT percent of DEPTH; the 256-entry depth and the 95 %
// threshold are the figures given for the design, the single waiter per slot
// is this design's choice.
//
// Timing: search, free-slot choice and slot read are combinational; alloc,
// free and marks take effect at the clock edge. Alloc and free may happen in
// the same cycle on different slots.
module prefetch_queue
  import cxl_dc_pkg::*;
#(
  parameter int unsigned DEPTH      = 256,
  parameter int unsigned THRESH_PCT = 95,
  parameter int unsigned BLK_OFF    = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // allocation
  input  logic                          alloc_valid,
  input  logic [PADDR_W-BLK_OFF-1:0]    alloc_blk,
  output logic [clog2c(DEPTH)-1:0]      alloc_idx,
  output logic                          can_alloc,   // below threshold
  // associative search
  input  logic [PADDR_W-BLK_OFF-1:0]    search_blk,
  output logic                          search_hit,
  output logic [clog2c(DEPTH)-1:0]      search_idx,
  output logic                          search_waiter,
  // marks on a found slot
  input  logic                          set_waiter,
  input  logic                          set_stale,
  input  logic [clog2c(DEPTH)-1:0]      mark_idx,
  input  logic [ID_W-1:0]               waiter_id,
  // slot read and release on response
  input  logic [clog2c(DEPTH)-1:0]      rd_idx,
  input  logic                          free_valid,
  output logic                          rd_valid,
  output logic [PADDR_W-BLK_OFF-1:0]    rd_blk,
  output logic                          rd_waiter,
  output logic [ID_W-1:0]               rd_waiter_id,
  output logic                          rd_stale,
  // status
  output logic [clog2c(DEPTH+1)-1:0]    count,
  output logic                          full
);

  localparam int unsigned IW = clog2c(DEPTH);
  localparam int unsigned BW = PADDR_W - BLK_OFF;
  localparam int unsigned CW = clog2c(DEPTH + 1);
  localparam int unsigned THRESH = (DEPTH * THRESH_PCT) / 100;

  typedef struct packed {
    logic            valid;
    logic [BW-1:0]   blk;
    logic            waiter;
    logic [ID_W-1:0] waiter_id;
    logic            stale;
  } slot_t;

  slot_t q [DEPTH];

  always_comb begin
    alloc_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (!q[i].valid) alloc_idx = IW'(i);
  end

  always_comb begin
    search_hit    = 1'b0;
    search_idx    = '0;
    search_waiter = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      if (q[i].valid && !q[i].stale && q[i].blk == search_blk && !search_hit) begin
        search_hit    = 1'b1;
        search_idx    = IW'(i);
        search_waiter = q[i].waiter;
      end
    end
  end

  assign full         = (count == CW'(DEPTH));
  assign can_alloc    = (count < CW'(THRESH)) && !full;
  assign rd_valid     = q[rd_idx].valid;
  assign rd_blk       = q[rd_idx].blk;
  assign rd_waiter    = q[rd_idx].waiter;
  assign rd_waiter_id = q[rd_idx].waiter_id;
  assign rd_stale     = q[rd_idx].stale;

  wire do_alloc = alloc_valid && !full;
  wire do_free  = free_valid && q[rd_idx].valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
      count <= '0;
    end else begin
      if (set_waiter) begin
        q[mark_idx].waiter    <= 1'b1;
        q[mark_idx].waiter_id <= waiter_id;
      end
      if (set_stale) q[mark_idx].stale <= 1'b1;
      if (do_free) q[rd_idx] <= '0;
      if (do_alloc) q[alloc_idx] <= '{valid: 1'b1, blk: alloc_blk, waiter: 1'b0,
                                      waiter_id: '0, stale: 1'b0};
      count <= count + CW'(do_alloc) - CW'(do_free);
    end
  end

  a_no_double_alloc: assert property (@(posedge clk) disable iff (!rst_n)
    do_alloc |-> !q[alloc_idx].valid);

endmodule
