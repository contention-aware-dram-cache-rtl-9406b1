// Age-ordered queue with associative search and removal from any position.
//
// Entries are kept compacted, oldest at index 0. Each cycle the queue can
// append one entry at the tail and remove one entry: either the head (pop) or
// the entry at remove_idx (remove), which the search port found by matching
// key. The entries behind a removed one move down by one position, so the
// order of the others is kept. The FAM controller uses it as its prefetch
// input queue, from which a promotion takes a prefetch out of turn.
module search_queue #(
  parameter type         T     = logic [7:0],
  parameter type         K     = logic [7:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     wr_data,
  input  K     wr_key,
  input  logic pop,
  input  logic remove,
  input  logic [$clog2(DEPTH)-1:0] remove_idx,
  input  K     search_key,
  output logic search_hit,
  output logic [$clog2(DEPTH)-1:0] search_idx,
  output T     search_data,
  output T     head,
  output logic empty,
  output logic full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  T q [DEPTH];
  K k [DEPTH];

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign head  = q[0];

  always_comb begin
    search_hit  = 1'b0;
    search_idx  = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (CW'(i) < count && k[i] == search_key) begin
        search_hit = 1'b1;
        search_idx = IW'(i);
      end
    end
    search_data = q[search_idx];
  end

  wire            do_rm   = (pop || remove) && !empty;
  wire [IW-1:0]   rm_idx  = pop ? '0 : remove_idx;
  wire            do_push = push && (!full || do_rm);
  wire [CW-1:0]   base    = count - CW'(do_rm);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        q[i] <= '0;
        k[i] <= '0;
      end
    end else begin
      if (do_rm) begin
        for (int i = 0; i < DEPTH - 1; i++) begin
          if (IW'(i) >= rm_idx) begin
            q[i] <= q[i+1];
            k[i] <= k[i+1];
          end
        end
      end
      if (do_push) begin
        q[base[IW-1:0]] <= wr_data;
        k[base[IW-1:0]] <= wr_key;
      end
      count <= base + CW'(do_push);
    end
  end

  a_pop_xor_remove: assert property (@(posedge clk) disable iff (!rst_n) !(pop && remove));

endmodule
