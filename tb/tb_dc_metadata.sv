// Testbench for dc_metadata, reduced to 4 sets of 4 ways: random lookups,
// probes and fills over a small pool of blocks are compared with a reference
// model that keeps last-use times instead of ages. Checked per operation:
// hit, DRAM location, victim choice (invalid way, else least recently used
// clean way, else least recently used), dirty victims and their rebuilt
// block address, and the two-cycle operation timing.
module tb_dc_metadata;
  import cxl_dc_pkg::*;
  localparam int WAYS = 4, SETS = 4, BO = 8, BW = PADDR_W - BO;
  localparam longint DCB = longint'(WAYS * SETS) << BO;
  localparam paddr_t BASE = 48'h0000_4000_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, req_write, rsp_valid, rsp_hit, rsp_evict, rsp_evict_dirty;
  logic [1:0] req_op;
  logic [BW-1:0] req_blk, rsp_evict_blk;
  paddr_t rsp_dc_addr;
  int checks = 0, failures = 0;

  dc_metadata #(.DC_BYTES(DCB), .BLK_OFF(BO), .WAYS(WAYS), .DC_BASE(BASE)) dut (.*);

  // reference model
  bit            m_v [SETS][WAYS];
  bit            m_d [SETS][WAYS];
  logic [BW-1:0] m_b [SETS][WAYS];
  longint        m_t [SETS][WAYS];
  longint        now = 0;

  function automatic int set_of(logic [BW-1:0] b);
    logic [1:0] h;
    h = b[1:0];
    for (int i = 2; i < BW; i += 2) h ^= b[i +: 2];
    return int'(h);
  endfunction

  task automatic chk(input bit c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask

  task automatic op(input int o, input bit wr, input logic [BW-1:0] b);
    int s, w, hw, vw;
    bit hit, ev, evd;
    logic [BW-1:0] evb;
    s = set_of(b);
    hit = 0; hw = 0;
    for (int i = 0; i < WAYS; i++) if (m_v[s][i] && m_b[s][i] == b) begin hit = 1; hw = i; end
    // victim
    vw = -1;
    for (int i = 0; i < WAYS; i++) if (!m_v[s][i] && vw < 0) vw = i;
    if (vw < 0) begin
      longint best = -1;
      for (int i = 0; i < WAYS; i++)
        if (!m_d[s][i] && (best < 0 || m_t[s][i] < best)) begin best = m_t[s][i]; vw = i; end
    end
    if (vw < 0) begin
      longint best = -1;
      for (int i = 0; i < WAYS; i++)
        if (best < 0 || m_t[s][i] < best) begin best = m_t[s][i]; vw = i; end
    end
    w = hit ? hw : vw;
    ev = (o == 2) && !hit && m_v[s][vw];
    evd = ev && m_d[s][vw];
    evb = m_b[s][vw];
    // drive
    @(posedge clk); #1;
    req_valid = 1; req_op = 2'(o); req_write = wr; req_blk = b;
    while (!req_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    req_valid = 0;
    chk(rsp_valid, "response one cycle after accept");
    chk(rsp_hit == hit, $sformatf("hit op%0d blk %h: dut %0d ref %0d", o, b, rsp_hit, hit));
    if (o != 1 && (hit || o == 2))
      chk(rsp_dc_addr == BASE + paddr_t'((s * WAYS + w) << BO),
          $sformatf("dc addr op%0d: %h", o, rsp_dc_addr));
    if (o == 2) begin
      chk(rsp_evict == ev && rsp_evict_dirty == evd, $sformatf("evict flags %0d%0d ref %0d%0d", rsp_evict, rsp_evict_dirty, ev, evd));
      if (ev) chk(rsp_evict_blk == evb, "victim block address");
    end
    // update model
    now++;
    if (o == 0 && hit) begin m_t[s][hw] = now; if (wr) m_d[s][hw] = 1; end
    if (o == 2) begin
      if (!hit) begin m_v[s][vw] = 1; m_d[s][vw] = 0; m_b[s][vw] = b; end
      m_t[s][w] = now;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [BW-1:0] pool [24];
    int fills = 0, dirty_ev = 0, clean_pref = 0;
    req_valid = 0; req_op = 0; req_write = 0; req_blk = '0;
    for (int i = 0; i < 24; i++) pool[i] = BW'(40'h12340 + i * 7 + (i % 3) * 40'h1000);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // after the reset sweep (4 sets) the table is ready
    repeat (SETS + 1) @(posedge clk);
    #1;
    chk(req_ready, "ready after reset sweep");
    for (int i = 0; i < 3000; i++) begin
      int o;
      o = $urandom_range(0, 9);
      o = (o < 4) ? 2 : (o < 8) ? 0 : 1;
      op(o, (o == 0) && ($urandom_range(0, 2) == 0), pool[$urandom_range(0, 23)]);
      if (o == 2 && rsp_evict_dirty) dirty_ev++;
    end
    chk(dirty_ev > 0, "dirty victims occurred");
    $display("dirty evictions: %0d", dirty_ev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
