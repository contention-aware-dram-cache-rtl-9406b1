// Testbench for wfq_sched: compares every decision against a reference model
// of the deficit weighted round robin written here, under random queue
// states, and checks the long-run service ratio under saturation (W : 1
// for demand : prefetch) and that an idle demand queue leaves every slot to
// prefetches (work conservation).
module tb_wfq_sched;
  localparam int W = 2, Q = 4, MAXD = 8, MAXP = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic slot, dq, pq, iss_d, iss_p;
  logic [3:0] r;
  int checks = 0, failures = 0;
  bit got_d, got_p;

  wfq_sched #(.W(W), .QUANTUM(Q), .MAX_DEM_DEF(MAXD), .MAX_PF_DEF(MAXP)) dut (
    .clk, .rst_n, .slot, .dq_nonempty(dq), .pq_nonempty(pq), .pq_ratio(r),
    .issue_demand(iss_d), .issue_prefetch(iss_p),
    .round(), .demand_deficit(), .prefetch_deficit()
  );

  // reference state
  int m_round = 0, m_dd = 0, m_pd = 0;
  task automatic model(input bit d, input bit p, input int rr, output bit od, output bit op);
    od = 0; op = 0;
    m_round = (m_round + 1) % (W + 1);
    if (m_round != 0) begin
      if (m_dd < MAXD) m_dd += Q;
      if (d && m_dd > 0) begin od = 1; m_dd -= 1; end
      else if (p && m_pd >= rr) begin op = 1; m_pd -= rr; end
    end else begin
      if (m_pd < MAXP) m_pd += Q;
      if (p && m_pd >= rr) begin op = 1; m_pd -= rr; end
      else if (d && m_dd > 0) begin od = 1; m_dd -= 1; end
    end
  endtask

  task automatic step(input bit s, input bit d, input bit p, input int rr);
    bit ed, ep;
    slot = s; dq = d; pq = p; r = 4'(rr);
    #1;
    if (s) begin
      model(d, p, rr, ed, ep);
      checks++;
      if (iss_d !== ed || iss_p !== ep) begin
        failures++;
        $display("mismatch: d=%0d p=%0d r=%0d dut=%0d%0d ref=%0d%0d", d, p, rr, iss_d, iss_p, ed, ep);
      end
    end else begin
      checks++;
      if (iss_d || iss_p) failures++;
    end
    got_d = iss_d; got_p = iss_p;
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nd, np;
    slot = 0; dq = 0; pq = 0; r = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    // random traffic
    for (int i = 0; i < 3000; i++)
      step($urandom_range(0, 3) != 0, $urandom_range(0, 1), $urandom_range(0, 1),
           ($urandom_range(0, 1) != 0) ? 4 : 1);
    // saturation with line-sized prefetches: demand : prefetch = W : 1
    for (int i = 0; i < 30; i++) step(1, 1, 1, 1);   // settle the deficits
    nd = 0; np = 0;
    for (int i = 0; i < 300; i++) begin
      step(1, 1, 1, 1);
      nd += int'(got_d); np += int'(got_p);
    end
    checks++;
    if (nd != 200 || np != 100) begin
      failures++;
      $display("ratio: demand %0d prefetch %0d, expected 200/100", nd, np);
    end
    // no demands: every slot serves a prefetch
    np = 0;
    for (int i = 0; i < 90; i++) begin
      step(1, 0, 1, 1);
      np += int'(got_p);
    end
    checks++;
    if (np != 90) begin
      failures++;
      $display("work conservation: %0d of 90 slots used", np);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
