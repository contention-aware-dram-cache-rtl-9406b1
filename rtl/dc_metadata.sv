// DRAM-cache metadata table.
//
// The DRAM cache is a reserved region of local DRAM managed by hardware as a
// set-associative cache of FAM blocks with LRU replacement. This module holds
// only its metadata, in on-chip SRAM. The block number of a node physical
// address is hashed into a set (the low index bits XOR-folded with the upper
// bits), and each way stores the tag (the bits above the index, from which the
// full block address can be rebuilt), a dirty bit, a valid bit and an LRU age.
// The DRAM location of a block follows from its set and way:
// DC_BASE + (set * WAYS + way) * block size.
//
// Operations:
//   LOOKUP  demand read or writeback: report hit and DRAM address; on a hit
//           the way becomes most recently used and a writeback sets dirty.
//   PROBE   redundancy check for a prefetch candidate: hit only, no update.
//   FILL    install a prefetched block. An invalid way is used first; else the
//           least recently used clean way; only if every way is dirty the least
//           recently used dirty way, whose address is reported so it can be
//           written back to FAM.
//
// The 16 MiB capacity and 256 B block are the sizes the design is described
// with; the 16 ways, the XOR-fold hash and the age-based LRU are this
// design's choices. After reset the table sweeps every set clean, one per
// cycle, with req_ready low. An operation takes two cycles: the set is read at
// the accepting edge and rsp_valid is high in the next cycle, while the set is
// written back; req_ready is low in that second cycle.
module dc_metadata
  import cxl_dc_pkg::*;
#(
  parameter longint unsigned DC_BYTES = 64'd16777216,  // 16 MiB
  parameter int unsigned     BLK_OFF  = 8,             // 256 B blocks
  parameter int unsigned     WAYS     = 16,
  parameter logic [PADDR_W-1:0] DC_BASE = 48'h0000_4000_0000
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       req_valid,
  output logic                       req_ready,
  input  logic [1:0]                 req_op,     // 0 lookup, 1 probe, 2 fill
  input  logic                       req_write,  // lookup by an LLC writeback
  input  logic [PADDR_W-BLK_OFF-1:0] req_blk,
  output logic                       rsp_valid,
  output logic                       rsp_hit,
  output paddr_t                     rsp_dc_addr,
  output logic                       rsp_evict,        // fill replaced a valid block
  output logic                       rsp_evict_dirty,
  output logic [PADDR_W-BLK_OFF-1:0] rsp_evict_blk
);

  localparam logic [1:0] OP_LOOKUP = 2'd0;
  localparam logic [1:0] OP_PROBE  = 2'd1;
  localparam logic [1:0] OP_FILL   = 2'd2;

  localparam longint unsigned BLOCKS = DC_BYTES >> BLK_OFF;
  localparam int unsigned SETS  = int'(BLOCKS / 64'(WAYS));
  localparam int unsigned IDX_W = clog2c(SETS);
  localparam int unsigned BW    = PADDR_W - BLK_OFF;
  localparam int unsigned TW    = BW - IDX_W;
  localparam int unsigned AW    = clog2c(WAYS);
  localparam int unsigned WW    = clog2c(WAYS);

  typedef struct packed {
    logic          valid;
    logic          dirty;
    logic [AW-1:0] age;   // 0 = most recently used
    logic [TW-1:0] tag;
  } way_t;
  typedef way_t [WAYS-1:0] set_t;

  set_t mem [SETS];

  function automatic logic [IDX_W-1:0] fold(logic [TW-1:0] t);
    logic [TW+IDX_W-1:0] ext;
    logic [IDX_W-1:0] h;
    ext = {{IDX_W{1'b0}}, t};
    h = '0;
    for (int i = 0; i < TW; i += IDX_W) h ^= ext[i +: IDX_W];
    return h;
  endfunction

  function automatic set_t touch(set_t s, logic [WW-1:0] w);
    set_t r;
    r = s;
    for (int i = 0; i < WAYS; i++)
      if (s[i].age < s[w].age) r[i].age = s[i].age + 1'b1;
    r[w].age = '0;
    return r;
  endfunction

  // ---- reset sweep
  logic               init_busy;
  logic [IDX_W-1:0]   init_idx;
  set_t               clean_set;

  always_comb
    for (int i = 0; i < WAYS; i++) clean_set[i] = '{valid: 1'b0, dirty: 1'b0, age: AW'(i), tag: '0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_idx  <= '0;
    end else if (init_busy) begin
      init_idx <= init_idx + 1'b1;
      if (init_idx == IDX_W'(SETS - 1)) init_busy <= 1'b0;
    end
  end

  // ---- stage A: accept and read the set
  logic [TW-1:0]    in_tag;
  logic [IDX_W-1:0] in_idx;
  assign in_tag = req_blk[BW-1:IDX_W];
  assign in_idx = req_blk[IDX_W-1:0] ^ fold(in_tag);

  logic             b_valid;
  logic [1:0]       b_op;
  logic             b_write;
  logic [TW-1:0]    b_tag;
  logic [IDX_W-1:0] b_idx;
  set_t             b_set;

  assign req_ready = !init_busy && !b_valid;
  wire accept = req_valid && req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      b_op    <= '0;
      b_write <= 1'b0;
      b_tag   <= '0;
      b_idx   <= '0;
    end else begin
      b_valid <= accept;
      if (accept) begin
        b_op    <= req_op;
        b_write <= req_write;
        b_tag   <= in_tag;
        b_idx   <= in_idx;
      end
    end
  end

  // ---- stage B: compare, choose, update
  logic          hit;
  logic [WW-1:0] hit_way, vict_way, use_way;
  set_t          new_set;

  always_comb begin
    logic have_inv, have_clean;
    logic [AW-1:0] clean_age;
    logic [WW-1:0] inv_way, clean_way, old_way;
    hit = 1'b0;
    hit_way = '0;
    have_inv = 1'b0;
    inv_way = '0;
    have_clean = 1'b0;
    clean_way = '0;
    clean_age = '0;
    old_way = '0;
    for (int i = 0; i < WAYS; i++) begin
      if (b_set[i].valid && b_set[i].tag == b_tag) begin
        hit = 1'b1;
        hit_way = WW'(i);
      end
      if (!b_set[i].valid && !have_inv) begin
        have_inv = 1'b1;
        inv_way = WW'(i);
      end
      if (b_set[i].valid && !b_set[i].dirty && (!have_clean || b_set[i].age > clean_age)) begin
        have_clean = 1'b1;
        clean_way = WW'(i);
        clean_age = b_set[i].age;
      end
      if (b_set[i].age == AW'(WAYS - 1)) old_way = WW'(i);
    end
    vict_way = have_inv ? inv_way : (have_clean ? clean_way : old_way);
    use_way  = hit ? hit_way : vict_way;

    new_set = b_set;
    unique case (b_op)
      OP_LOOKUP: if (hit) begin
        new_set = touch(b_set, hit_way);
        if (b_write) new_set[hit_way].dirty = 1'b1;
      end
      OP_FILL: begin
        new_set = touch(b_set, use_way);
        if (!hit) new_set[use_way] = '{valid: 1'b1, dirty: 1'b0, age: '0, tag: b_tag};
      end
      default: ;
    endcase
  end

  assign rsp_valid       = b_valid;
  assign rsp_hit         = hit;
  assign rsp_dc_addr     = DC_BASE + (paddr_t'({b_idx, use_way}) << BLK_OFF);
  assign rsp_evict       = b_valid && (b_op == OP_FILL) && !hit && b_set[vict_way].valid;
  assign rsp_evict_dirty = rsp_evict && b_set[vict_way].dirty;
  assign rsp_evict_blk   = {b_set[vict_way].tag, b_idx ^ fold(b_set[vict_way].tag)};

  // ---- the metadata SRAM: one read and one write port
  always_ff @(posedge clk) begin
    if (accept) b_set <= mem[in_idx];
    if (init_busy) mem[init_idx] <= clean_set;
    else if (b_valid && b_op != OP_PROBE) mem[b_idx] <= new_set;
  end

endmodule
