// Signature Path Prefetcher for the DRAM cache, working on sub-page blocks.
//
// Every FAM-bound LLC read trains the prefetcher with its physical address.
// The signature table, indexed by page, keeps the last block touched in the
// page and a compressed history of block deltas (the signature). A training
// access computes delta = block - last_block and the new signature
// (sig << SIG_SHIFT) ^ delta, strengthens that delta in the pattern-table
// entry of the old signature, and then walks the pattern table: the strongest
// delta of the current signature gives the next prefetch block, and the
// speculative signature built from it indexes the next step. The walk stops
// after DEGREE prefetches, when the entry holds no delta, or at the page edge.
//
// Deltas are counted in DRAM-cache blocks (BLK_OFF = log2 block size), not in
// 64 B lines, and addresses produced are block aligned. The table sizes are
// twice those of the original SPP, as the DRAM-cache prefetcher can afford the
// storage; the exact original sizes (256/512 entries), the 12-bit signature,
// the 4-bit counters, the partial page tag, the pattern-table index and the
// prefetch degree are this design's choices. The global history table that
// lets a new page start from the previous page's pattern is not built: a page
// missing in the signature table only allocates an entry.
//
// Interface: train_valid/train_ready accepts one address (ready while idle
// and during the walk). One cycle later the tables are updated, then one
// candidate per cycle is offered on pf_valid/pf_addr and held until pf_ready.
// A training address that arrives during the walk ends it: candidates not yet
// taken are abandoned, so a slow consumer never blocks training.
module spp_prefetcher
  import cxl_dc_pkg::*;
#(
  parameter int unsigned BLK_OFF    = 8,     // 256 B DRAM-cache block
  parameter int unsigned ST_ENTRIES = 512,   // signature table entries
  parameter int unsigned PT_ENTRIES = 1024,  // pattern table entries
  parameter int unsigned SIG_W      = 12,
  parameter int unsigned SIG_SHIFT  = 4,
  parameter int unsigned DELTAS     = 4,     // (delta, weight) pairs per entry
  parameter int unsigned CNT_W      = 4,
  parameter int unsigned ST_TAG_W   = 16,
  parameter int unsigned DEGREE     = 4      // maximum prefetches per training
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   train_valid,
  output logic   train_ready,
  input  paddr_t train_addr,
  output logic   pf_valid,
  input  logic   pf_ready,
  output paddr_t pf_addr
);

  localparam int unsigned OFF_W  = PAGE_OFF - BLK_OFF;   // block index in page
  localparam int unsigned DW     = OFF_W + 1;            // signed delta
  localparam int unsigned STI_W  = clog2c(ST_ENTRIES);
  localparam int unsigned PTI_W  = clog2c(PT_ENTRIES);
  localparam int unsigned DI_W   = clog2c(DELTAS);
  localparam int unsigned PAGE_W = PADDR_W - PAGE_OFF;
  localparam int unsigned DEG_W  = clog2c(DEGREE + 1);
  localparam logic [CNT_W-1:0] CMAX = '1;

  typedef logic signed [DW-1:0] delta_t;
  typedef logic [SIG_W-1:0]     sig_t;

  typedef struct packed {
    logic                valid;
    logic [ST_TAG_W-1:0] tag;
    logic [OFF_W-1:0]    last;
    sig_t                sig;
  } st_entry_t;

  typedef struct packed {
    logic             valid;
    delta_t           delta;
    logic [CNT_W-1:0] cnt;
  } pt_pair_t;

  typedef struct packed {
    logic [CNT_W-1:0]       csig;
    pt_pair_t [DELTAS-1:0]  pairs;
  } pt_entry_t;

  st_entry_t st [ST_ENTRIES];
  pt_entry_t pt [PT_ENTRIES];

  function automatic logic [PTI_W-1:0] pt_index(sig_t s);
    logic [SIG_W+PTI_W-1:0] ext;
    logic [PTI_W-1:0] h;
    ext = {{PTI_W{1'b0}}, s};
    h = '0;
    for (int i = 0; i < SIG_W; i += PTI_W) h ^= ext[i +: PTI_W];
    return h;
  endfunction

  function automatic sig_t sig_next(sig_t s, delta_t d);
    return sig_t'(s << SIG_SHIFT) ^ sig_t'($unsigned(d));
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_TRAIN, S_LOOK} state_e;
  state_e state;

  paddr_t              req_addr;
  logic [PAGE_W-1:0]   cur_page;
  logic [OFF_W-1:0]    cur_off;
  sig_t                cur_sig;
  logic [DEG_W-1:0]    issued;

  // ---- training step (S_TRAIN), all combinational from registered request
  logic [PAGE_W-1:0]   req_page;
  logic [OFF_W-1:0]    req_off;
  logic [STI_W-1:0]    st_idx;
  logic [ST_TAG_W-1:0] st_tag;
  st_entry_t           st_rd;
  logic                st_hit;
  delta_t              tr_delta;
  sig_t                tr_sig_new;
  logic [PTI_W-1:0]    upd_idx;
  pt_entry_t           upd_old, upd_new;

  assign req_page = req_addr[PADDR_W-1:PAGE_OFF];
  assign req_off  = req_addr[PAGE_OFF-1:BLK_OFF];
  assign st_idx   = req_page[STI_W-1:0];
  assign st_tag   = ST_TAG_W'(req_page >> STI_W);
  assign st_rd    = st[st_idx];
  assign st_hit   = st_rd.valid && (st_rd.tag == st_tag);
  assign tr_delta = delta_t'($signed({1'b0, req_off}) - $signed({1'b0, st_rd.last}));
  assign tr_sig_new = sig_next(st_rd.sig, tr_delta);
  assign upd_idx  = pt_index(st_rd.sig);
  assign upd_old  = pt[upd_idx];

  always_comb begin
    logic found;
    logic [DI_W-1:0] victim;
    logic [CNT_W-1:0] vcnt;
    upd_new = upd_old;
    found   = 1'b0;
    victim  = '0;
    vcnt    = CMAX;
    if (upd_new.csig != CMAX) upd_new.csig = upd_new.csig + 1'b1;
    for (int i = 0; i < DELTAS; i++) begin
      if (upd_old.pairs[i].valid && upd_old.pairs[i].delta == tr_delta) begin
        found = 1'b1;
        if (upd_old.pairs[i].cnt == CMAX) begin
          // saturation: halve every weight so the newest trend keeps rising
          for (int j = 0; j < DELTAS; j++)
            upd_new.pairs[j].cnt = upd_old.pairs[j].cnt >> 1;
          upd_new.pairs[i].cnt = (CMAX >> 1) + 1'b1;
        end else begin
          upd_new.pairs[i].cnt = upd_old.pairs[i].cnt + 1'b1;
        end
      end
    end
    if (!found) begin
      // replace an empty pair, else the weakest one
      for (int i = DELTAS - 1; i >= 0; i--) begin
        if (!upd_old.pairs[i].valid) begin
          victim = DI_W'(i);
          vcnt   = '0;
        end
      end
      if (vcnt != '0) begin
        for (int i = DELTAS - 1; i >= 0; i--) begin
          if (upd_old.pairs[i].cnt <= vcnt) begin
            victim = DI_W'(i);
            vcnt   = upd_old.pairs[i].cnt;
          end
        end
      end
      upd_new.pairs[victim].valid = 1'b1;
      upd_new.pairs[victim].delta = tr_delta;
      upd_new.pairs[victim].cnt   = CNT_W'(1);
    end
  end

  // ---- lookahead step (S_LOOK)
  pt_entry_t           la_ent;
  logic                la_found;
  delta_t              la_delta;
  logic signed [OFF_W+1:0] la_target;
  logic                la_inpage;

  assign la_ent = pt[pt_index(cur_sig)];

  always_comb begin
    logic [CNT_W-1:0] best;
    la_found = 1'b0;
    la_delta = '0;
    best     = '0;
    for (int i = 0; i < DELTAS; i++) begin
      if (la_ent.pairs[i].valid && la_ent.pairs[i].cnt > best && la_ent.pairs[i].delta != '0) begin
        best     = la_ent.pairs[i].cnt;
        la_delta = la_ent.pairs[i].delta;
        la_found = 1'b1;
      end
    end
    la_target = $signed({2'b00, cur_off}) + (OFF_W+2)'(la_delta);
    la_inpage = (la_target >= 0) && (la_target < (OFF_W+2)'(1 << OFF_W));
  end

  wire look_emit = (state == S_LOOK) && la_found && la_inpage && (issued < DEG_W'(DEGREE));

  assign train_ready = (state == S_IDLE) || (state == S_LOOK);
  assign pf_valid    = look_emit;
  assign pf_addr     = {cur_page, la_target[OFF_W-1:0], {BLK_OFF{1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      req_addr <= '0;
      cur_page <= '0;
      cur_off  <= '0;
      cur_sig  <= '0;
      issued   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (train_valid) begin
          req_addr <= train_addr;
          state    <= S_TRAIN;
        end
        S_TRAIN: begin
          cur_page <= req_page;
          cur_off  <= req_off;
          issued   <= '0;
          if (st_hit && tr_delta != '0) begin
            cur_sig <= tr_sig_new;
            state   <= S_LOOK;
          end else if (st_hit) begin
            cur_sig <= st_rd.sig;   // same block again: no new delta, still look ahead
            state   <= S_LOOK;
          end else begin
            state   <= S_IDLE;      // first touch of the page: allocate only
          end
        end
        S_LOOK: begin
          if (train_valid) begin
            // a new access ends the walk; the rest of it is not offered
            req_addr <= train_addr;
            state    <= S_TRAIN;
          end else if (!look_emit) state <= S_IDLE;
          else if (pf_ready) begin
            issued  <= issued + 1'b1;
            cur_off <= la_target[OFF_W-1:0];
            cur_sig <= sig_next(cur_sig, la_delta);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Table writes. The valid bits are cleared at reset; the other fields are
  // only read once valid.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ST_ENTRIES; i++) st[i] <= '0;
      for (int i = 0; i < PT_ENTRIES; i++) pt[i] <= '0;
    end else if (state == S_TRAIN) begin
      if (st_hit && tr_delta != '0) pt[upd_idx] <= upd_new;
      st[st_idx] <= '{valid: 1'b1, tag: st_tag, last: req_off,
                      sig: (st_hit && tr_delta != '0) ? tr_sig_new : (st_hit ? st_rd.sig : '0)};
    end
  end

endmodule
