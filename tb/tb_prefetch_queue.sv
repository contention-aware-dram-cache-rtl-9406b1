// Testbench for prefetch_queue (reduced to 16 slots, 75 % threshold): fills
// the queue against a reference list of slots, checks search hits and misses,
// the waiter and stale marks, release by slot number, the occupancy count,
// and that allocation stops at the threshold and at full.
module tb_prefetch_queue;
  import cxl_dc_pkg::*;
  localparam int D = 16, TH = 75, BO = 8, BW = PADDR_W - BO;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic alloc_valid, can_alloc, search_hit, search_waiter, set_waiter, set_stale;
  logic free_valid, rd_valid, rd_waiter, rd_stale, full;
  logic [BW-1:0] alloc_blk, search_blk, rd_blk;
  logic [3:0] alloc_idx, search_idx, mark_idx, rd_idx;
  logic [ID_W-1:0] waiter_id, rd_waiter_id;
  logic [4:0] count;
  int checks = 0, failures = 0;

  prefetch_queue #(.DEPTH(D), .THRESH_PCT(TH), .BLK_OFF(BO)) dut (.*);

  logic [BW-1:0] ref_blk [D];
  bit            ref_v [D];

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic idle();
    alloc_valid = 0; set_waiter = 0; set_stale = 0; free_valid = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    idle();
    alloc_blk = '0; search_blk = '0; mark_idx = '0; rd_idx = '0; waiter_id = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    chk(count == 0 && can_alloc, "empty after reset");
    // allocate until the threshold (12 of 16)
    n = 0;
    while (can_alloc) begin
      alloc_blk = BW'(40'h1000 + n * 3);
      alloc_valid = 1;
      #1;
      chk(!ref_v[alloc_idx], "free slot chosen");
      ref_v[alloc_idx] = 1; ref_blk[alloc_idx] = alloc_blk;
      @(posedge clk); #1;
      idle();
      n++;
      if (n > D) break;
    end
    chk(n == (D * TH) / 100, $sformatf("threshold stops allocation at %0d", n));
    chk(count == 5'(n) && !full, "count at threshold");
    // search: every allocated block hits at its slot, others miss
    for (int i = 0; i < D; i++) if (ref_v[i]) begin
      search_blk = ref_blk[i]; #1;
      chk(search_hit && search_idx == 4'(i), "search hit at its slot");
    end
    search_blk = BW'(40'h1001); #1;
    chk(!search_hit, "search miss");
    // waiter mark on slot 3
    search_blk = ref_blk[3]; #1;
    mark_idx = search_idx; waiter_id = 8'h5A; set_waiter = 1;
    @(posedge clk); #1; idle();
    search_blk = ref_blk[3]; #1;
    chk(search_waiter, "waiter seen by search");
    rd_idx = 4'd3; #1;
    chk(rd_valid && rd_waiter && rd_waiter_id == 8'h5A && rd_blk == ref_blk[3], "slot read");
    // stale mark hides the slot from search
    mark_idx = 4'd5; set_stale = 1;
    @(posedge clk); #1; idle();
    search_blk = ref_blk[5]; #1;
    chk(!search_hit, "stale slot not found");
    rd_idx = 4'd5; #1;
    chk(rd_stale, "stale flag read");
    // release slot 3 and allocate in the same cycle
    rd_idx = 4'd3; free_valid = 1;
    alloc_blk = BW'(40'h9999); alloc_valid = 1; #1;
    chk(alloc_idx == 4'(n), "next free slot while freeing");
    @(posedge clk); #1; idle();
    chk(count == 5'(n), "count after alloc+free");
    rd_idx = 4'd3; #1;
    chk(!rd_valid, "slot 3 released");
    // past the threshold nothing is refused by the queue itself up to full
    while (!full) begin
      alloc_blk = BW'(40'h7000 + count); alloc_valid = 1;
      @(posedge clk); #1; idle();
    end
    chk(count == 5'(D) && !can_alloc, "full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
