// Self-checking testbench of bw_adapt, the prefetch bandwidth adaptation unit.
//
// A short sampling period (256 cycles) keeps the run small. The bench plays a
// compute node: demand reads arrive at random, some are DRAM-cache hits (only
// demand_total), the others go to FAM (demand_total and demand_issued) and
// return after a latency that the bench changes by phase: low, then high
// (congestion), then low again. Prefetches are issued at random while
// pf_allow is high.
//
// A reference model in the bench counts the same events per period and works
// out, at every period end, the Little's-law latency, its moving average, the
// minimum of the last eight averages, congestion (more than 30 % above that
// minimum), the accuracy, and the next rate: x1.125 without congestion, or a
// cut proportional to the excess latency and softened by accuracy. These and
// the credit gate are compared with the unit every period and every cycle.
// Directed checks: the rate falls during the congested phase and rises again
// by exactly 1/8 per period afterwards; with enable low the rate stays at
// its maximum and pf_allow stays high.
module tb_bw_adapt;

  localparam int S      = 256;
  localparam int DEGREE = 4;
  localparam int RMAX   = DEGREE * 256;

  logic clk = 0, rst_n = 0, enable = 1;
  logic ev_total = 0, ev_issued = 0, ev_returned = 0, ev_pf = 0;
  logic        pf_allow, congested, sample_done, pgd;
  logic [15:0] rate, ppd, dpp, accuracy;
  logic [31:0] lat_avg, lat_min;

  bw_adapt #(.SAMPLE_CYCLES(S), .DEGREE(DEGREE)) dut (
    .clk, .rst_n, .enable,
    .ev_demand_total(ev_total), .ev_demand_issued(ev_issued),
    .ev_demand_returned(ev_returned), .ev_prefetch_issued(ev_pf),
    .pf_allow, .rate, .ppd, .dpp, .pgd, .lat_avg, .lat_min, .accuracy,
    .congested, .sample_done
  );

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
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model
  longint k = 0;                        // cycle index since reset
  longint a_tot, a_iss, a_ret, a_pf, a_lat;
  longint s_tot, s_iss, s_ret, s_pf, s_lat;
  longint outst = 0;
  longint m_avg = 0, m_min = 0, m_acc = 256, m_exc = 0, m_rate = RMAX, m_dpp = 1;
  bit     m_cong = 0;
  longint hq[$];                        // averages, newest first
  int     credit = 0, dcount = 0;
  bit     pending = 0;                  // a sample was taken, results due

  function automatic longint div(longint a, longint b);
    return (b == 0) ? 0 : a / b;
  endfunction

  task automatic model_sample();
    longint inst, nav, mn, hits, dec, r;
    // latency
    inst = (s_ret == 0) ? m_avg : div(s_lat * 16, s_ret);
    if (s_ret == 0) nav = m_avg;
    else if (hq.size() == 0) nav = inst;
    else nav = m_avg + ((inst - m_avg) >>> 2);
    m_avg = nav;
    if (s_ret != 0) begin
      hq.push_front(nav);
      if (hq.size() > 8) void'(hq.pop_back());
      mn = nav;
      foreach (hq[i]) if (hq[i] < mn) mn = hq[i];
      m_min = mn;
    end
    // accuracy and congestion
    hits  = (s_tot > s_iss) ? s_tot - s_iss : 0;
    m_acc = (s_pf == 0) ? 256 : div(hits * 256, s_pf);
    if (m_acc > 256) m_acc = 256;
    m_cong = (s_ret != 0) && (m_avg * 100 > m_min * 130);
    m_exc  = div(((m_avg > m_min) ? m_avg - m_min : 0) * 256, (m_min == 0) ? 1 : m_min);
    // rate
    dec = (m_exc * (512 - m_acc)) >> 9;
    if (dec > 128) dec = 128;
    if (dec < 16) dec = 16;
    if (!enable) r = RMAX;
    else if (m_cong) begin
      r = m_rate - ((m_rate * dec) >> 8);
      if (r < 8) r = 8;
    end else begin
      r = m_rate + (((m_rate >> 3) == 0) ? 1 : (m_rate >> 3));
      if (r > RMAX) r = RMAX;
    end
    m_rate = r;
    m_dpp  = div(65536, r);
    if (m_dpp == 0) m_dpp = 1;
  endtask

  // events sampled at each rising edge, as the unit sees them
  always @(posedge clk) if (rst_n) begin
    bit last;
    last = ((k % S) == S - 1);
    if (last) begin
      s_tot = a_tot; s_iss = a_iss; s_ret = a_ret; s_pf = a_pf; s_lat = a_lat;
      a_tot = ev_total; a_iss = ev_issued; a_ret = ev_returned; a_pf = ev_pf; a_lat = outst;
      pending = 1;
    end else begin
      a_tot += ev_total; a_iss += ev_issued; a_ret += ev_returned; a_pf += ev_pf; a_lat += outst;
    end
    outst += ev_issued - ev_returned;
    // credit gate, using the unit's rate outputs of this cycle
    begin
      int c;
      c = credit;
      if (ev_total) begin
        if (rate >= 256) c += rate >> 8;
        else if (dcount + 1 >= dpp) c += 1;
        if (rate < 256) dcount = (dcount + 1 >= dpp) ? 0 : dcount + 1;
      end
      if (ev_pf && enable && c != 0) c -= 1;
      credit = (c > 8) ? 8 : c;
    end
    k++;
  end

  // compare at the end of every computation
  int n_samples = 0, n_cong = 0, n_inc_exact = 0, n_dec = 0;
  longint prev_rate = RMAX;

  always @(posedge clk) if (rst_n && sample_done) begin
    #1;
    check(pending, "sample_done without a sample");
    pending = 0;
    model_sample();
    n_samples++;
    check(lat_avg == 32'(m_avg), $sformatf("lat_avg %0d exp %0d", lat_avg, m_avg));
    check(lat_min == 32'(m_min), $sformatf("lat_min %0d exp %0d", lat_min, m_min));
    check(accuracy == 16'(m_acc), $sformatf("accuracy %0d exp %0d", accuracy, m_acc));
    check(congested == m_cong, $sformatf("congested %0b exp %0b", congested, m_cong));
    check(rate == 16'(m_rate), $sformatf("rate %0d exp %0d", rate, m_rate));
    check(dpp == 16'(m_dpp), $sformatf("dpp %0d exp %0d", dpp, m_dpp));
    check(ppd == 16'(m_rate >> 8) && pgd == (m_rate >= 256), "ppd/pgd");
    if (congested && enable) begin
      n_cong++;
      if (rate < prev_rate) n_dec++;
    end
    if (!congested && enable && prev_rate < RMAX && prev_rate >= 8
        && rate == 16'(prev_rate + prev_rate / 8)) n_inc_exact++;
    prev_rate = rate;
  end

  always @(negedge clk) if (rst_n) check(pf_allow == (!enable || credit != 0), "pf_allow vs credit");

  // ---------------- stimulus
  longint due[$];                      // return cycles of outstanding demands
  int lat_now = 20;

  task automatic run(int cycles, int lat, int p_demand, int p_hit);
    lat_now = lat;
    repeat (cycles) begin
      @(negedge clk);
      ev_total = 0; ev_issued = 0; ev_returned = 0; ev_pf = 0;
      if (due.size() != 0 && due[0] <= k) begin
        void'(due.pop_front());
        ev_returned = 1;
      end
      if ($urandom_range(99) < p_demand) begin
        ev_total = 1;
        if ($urandom_range(99) >= p_hit) begin
          ev_issued = 1;
          due.push_back(k + lat_now + $urandom_range(3));
        end
      end
      if (pf_allow && $urandom_range(99) < 40) ev_pf = 1;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // warm up at low latency, then congestion, then recovery
    run(12 * S, 16, 30, 40);
    begin
      longint r_before;
      r_before = rate;
      run(6 * S, 64, 30, 40);
      check(rate < r_before, $sformatf("rate fell under congestion: %0d -> %0d", r_before, rate));
    end
    begin
      longint r_low;
      r_low = rate;
      run(20 * S, 16, 30, 40);
      check(rate > r_low, $sformatf("rate recovered: %0d -> %0d", r_low, rate));
    end
    // non-adaptive mode
    enable = 0;
    run(3 * S, 64, 30, 40);
    check(rate == 16'(RMAX), "rate at maximum when disabled");
    check(pf_allow, "pf_allow high when disabled");
    enable = 1;
    run(2 * S, 16, 30, 40);

    check(n_samples >= 30, $sformatf("samples %0d", n_samples));
    check(n_cong > 0, "congestion seen");
    check(n_dec > 0, "rate decreased under congestion");
    check(n_inc_exact > 0, "x1.125 increase seen");
    $display("samples=%0d congested=%0d decreases=%0d exact_increases=%0d",
             n_samples, n_cong, n_dec, n_inc_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
