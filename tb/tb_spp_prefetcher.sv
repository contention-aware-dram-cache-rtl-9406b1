// Testbench for spp_prefetcher: trains with stride patterns and compares the
// prefetch addresses produced after each access with lists worked out by hand
// from the signature rules (delta, sig = (sig << 4) ^ delta, strongest delta,
// lookahead up to the degree, stop at the page end). It also checks that a
// pattern learned on one page is replayed on a new page, that one prefetch
// is offered per cycle, that a candidate is held while pf_ready is low, and
// that a new training address is taken during the walk and starts a new one.
module tb_spp_prefetcher;
  import cxl_dc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   train_valid, train_ready, pf_valid, pf_ready;
  paddr_t train_addr, pf_addr;
  int checks = 0, failures = 0;
  int none[$];

  spp_prefetcher dut (.clk, .rst_n, .train_valid, .train_ready, .train_addr,
                      .pf_valid, .pf_ready, .pf_addr);

  function automatic paddr_t ba(int page, int off);
    return paddr_t'((longint'(page) << 12) | (longint'(off) << 8));
  endfunction

  // train with one address, collect the prefetches, compare with exp[]
  task automatic access(input int page, input int off, input int exp[$]);
    paddr_t got[$];
    int cyc_first, cyc_last, cyc;
    @(posedge clk); #1;
    train_valid = 1; train_addr = ba(page, off) | 48'h40;
    @(posedge clk); #1;
    train_valid = 0;
    cyc = 0; cyc_first = -1; cyc_last = -1;
    while (!train_ready || pf_valid) begin
      if (pf_valid) begin
        got.push_back(pf_addr);
        if (cyc_first < 0) cyc_first = cyc;
        cyc_last = cyc;
      end
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("page %h off %0d: %0d prefetches, expected %0d", page, off, got.size(), exp.size());
    end else begin
      foreach (exp[i]) begin
        checks++;
        if (got[i] != ba(page, exp[i])) begin
          failures++;
          $display("page %h off %0d: prefetch %0d = %h, expected %h", page, off, i, got[i], ba(page, exp[i]));
        end
      end
      if (exp.size() > 1) begin
        checks++;
        if (cyc_last - cyc_first != exp.size() - 1) begin
          failures++;
          $display("prefetches not one per cycle");
        end
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    train_valid = 0; train_addr = '0; pf_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // page 0x100, stride +1: the signature settles at 0x111 after three deltas
    access('h100, 0, none);
    access('h100, 1, none);
    access('h100, 2, none);
    access('h100, 3, none);
    access('h100, 4, {5, 6, 7, 8});
    access('h100, 5, {6, 7, 8, 9});
    // a new page replays the learned +1 pattern from its second access
    access('h2345, 0, none);
    access('h2345, 1, {2, 3, 4, 5});
    // the walk stops at the page end
    access('h777, 11, none);
    access('h777, 12, {13, 14, 15});
    // same block again: no new delta, lookahead from the stored signature
    access('h777, 12, {13, 14, 15});
    // back-pressure: the candidate is held until taken
    @(posedge clk); #1;
    pf_ready = 0;
    train_valid = 1; train_addr = ba('h100, 6);
    @(posedge clk); #1;
    train_valid = 0;
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (!pf_valid || pf_addr != ba('h100, 7)) begin
      failures++;
      $display("held candidate wrong: v=%0d %h", pf_valid, pf_addr);
    end
    // training is still taken during the walk and ends it
    checks++;
    if (!train_ready) begin
      failures++;
      $display("training refused during the walk");
    end
    pf_ready = 1;
    access('h100, 7, {8, 9, 10, 11});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
