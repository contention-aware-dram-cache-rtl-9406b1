// WFQ weight sweep of the FAM controller: demand weight 1, 2 and 3.
//
// Three fam_ctrl instances, identical except for W, run side by side under
// the same saturated load: node 0 always offers 64 B demand reads, node 1
// always offers 256 B DRAM-cache prefetches, and the FAM device is always
// ready. After the queues have filled, the bench counts the issues of each
// class over a fixed window. With W demand rounds per prefetch round the
// controller must issue exactly W demands per prefetch (within one window's
// rounding), and every issue slot must follow the previous one after
// ISSUE_INTERVAL cycles per 64 B of the previous request, so the FAM time
// given to prefetches is 4 / (W + 4) of the total. The counts and the
// resulting bandwidth shares are printed for each weight. The swept weights
// are those the design is evaluated with; the load pattern and the window
// length are this bench's own.
module tb_wfq_weights;
  import cxl_dc_pkg::*;

  localparam int NODES = 2;
  localparam int II    = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the same offered load for every instance
  logic     [NODES-1:0] req_valid = '0;
  m2s_req_t [NODES-1:0] req;
  always_comb begin
    req = '0;
    req[0].opc = M2S_MEM_RD;
    req[0].node = NODE_W'(0);
    req[0].addr = 48'h0000_0010_0000;
    req[1].opc = M2S_MEM_RD;
    req[1].pf_hint = 1'b1;
    req[1].dc_block = 1'b1;
    req[1].node = NODE_W'(1);
    req[1].addr = 48'h0000_0020_0000;
  end

  logic     [2:0][NODES-1:0] req_ready, rsp_valid;
  logic     [2:0]            dev_req_valid, dev_rsp_ready;
  m2s_req_t [2:0]            dev_req;
  s2m_rsp_t [2:0]            rsp;
  logic     [2:0][31:0]      n_pr, n_pd, n_di, n_pi;

  fam_ctrl #(.NODES(NODES), .ISSUE_INTERVAL(II), .W(1)) u_w1 (
    .clk, .rst_n, .req_valid, .req_ready(req_ready[0]), .req,
    .dev_req_valid(dev_req_valid[0]), .dev_req_ready(1'b1), .dev_req(dev_req[0]),
    .dev_rsp_valid(1'b0), .dev_rsp_ready(dev_rsp_ready[0]), .dev_rsp('0),
    .rsp_valid(rsp_valid[0]), .rsp_ready('1), .rsp(rsp[0]),
    .n_promoted(n_pr[0]), .n_promote_dropped(n_pd[0]), .n_demand_issued(n_di[0]), .n_prefetch_issued(n_pi[0]));
  fam_ctrl #(.NODES(NODES), .ISSUE_INTERVAL(II), .W(2)) u_w2 (
    .clk, .rst_n, .req_valid, .req_ready(req_ready[1]), .req,
    .dev_req_valid(dev_req_valid[1]), .dev_req_ready(1'b1), .dev_req(dev_req[1]),
    .dev_rsp_valid(1'b0), .dev_rsp_ready(dev_rsp_ready[1]), .dev_rsp('0),
    .rsp_valid(rsp_valid[1]), .rsp_ready('1), .rsp(rsp[1]),
    .n_promoted(n_pr[1]), .n_promote_dropped(n_pd[1]), .n_demand_issued(n_di[1]), .n_prefetch_issued(n_pi[1]));
  fam_ctrl #(.NODES(NODES), .ISSUE_INTERVAL(II), .W(3)) u_w3 (
    .clk, .rst_n, .req_valid, .req_ready(req_ready[2]), .req,
    .dev_req_valid(dev_req_valid[2]), .dev_req_ready(1'b1), .dev_req(dev_req[2]),
    .dev_rsp_valid(1'b0), .dev_rsp_ready(dev_rsp_ready[2]), .dev_rsp('0),
    .rsp_valid(rsp_valid[2]), .rsp_ready('1), .rsp(rsp[2]),
    .n_promoted(n_pr[2]), .n_promote_dropped(n_pd[2]), .n_demand_issued(n_di[2]), .n_prefetch_issued(n_pi[2]));

  // issue observation on the device side (one request per slot, in order)
  bit     measure = 0;
  int     cnt_d[3], cnt_p[3];
  longint last[3], gap_need[3], cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int i = 0; i < 3; i++) if (dev_req_valid[i]) begin
      if (measure) begin
        check(cyc - last[i] == gap_need[i],
              $sformatf("W=%0d slot spacing %0d, expected %0d", i + 1, cyc - last[i], gap_need[i]));
        if (dev_req[i].pf_hint) cnt_p[i]++; else cnt_d[i]++;
      end
      last[i]     = cyc;
      gap_need[i] = II * (dev_req[i].dc_block ? 4 : 1);
    end
  end

  initial begin
    for (int i = 0; i < 3; i++) begin
      cnt_d[i] = 0;
      cnt_p[i] = 0;
      last[i] = 0;
      gap_need[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    req_valid = '1;                    // both nodes offer a request every cycle
    repeat (200) @(negedge clk);       // queues fill
    measure = 1;
    repeat (3000) @(negedge clk);
    measure = 0;
    for (int i = 0; i < 3; i++) begin
      int w, d, p;
      w = i + 1;
      d = cnt_d[i];
      p = cnt_p[i];
      check(p > 50, $sformatf("W=%0d prefetches issued %0d", w, p));
      check(d >= w * p - w && d <= w * p + w,
            $sformatf("W=%0d share: %0d demands for %0d prefetches", w, d, p));
      $display("W=%0d demand=%0d prefetch=%0d ratio=%0d.%02d prefetch share of FAM time=%0d%%",
               w, d, p, d / p, (100 * d / p) % 100, (100 * 4 * p) / (d + 4 * p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
