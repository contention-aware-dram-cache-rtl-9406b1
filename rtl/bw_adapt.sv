// Prefetch bandwidth adaptation at the compute node.
//
// The unit watches four events of its root complex: a FAM-bound demand read
// arriving (demand_total), a demand read sent to FAM (demand_issued), its
// response returning (demand_returned) and a DRAM-cache prefetch sent to FAM
// (prefetch_issued). Their instantaneous counts are taken and cleared at the
// end of every sampling period of SAMPLE_CYCLES cycles; then:
//
//   * demand latency of the period, by Little's law: the sum over the period
//     of the demand reads outstanding each cycle, divided by the reads that
//     returned (fixed point, 4 fraction bits);
//   * its exponential moving average, avg += (inst - avg) / 4;
//   * the minimum demand latency: the smallest average of the last HIST
//     (8) periods;
//   * congestion when avg > 1.30 * minimum;
//   * prefetch accuracy: demands that did not need FAM (total - issued) per
//     prefetch issued, 8 fraction bits, capped at 1.0;
//   * the prefetch rate, in prefetches per demand with 8 fraction bits, by
//     multiplicative increase and decrease: without congestion it grows by
//     1/8 (x1.125); with congestion it shrinks by a fraction that grows
//     linearly with (avg - min) / min, and is halved again for a fully
//     accurate prefetcher, so accurate streams are cut more slowly;
//   * from the rate: prefetches per demand, demands per prefetch, and whether
//     prefetches outnumber demands.
//
// The issue gate is a credit counter: each demand read adds ppd credits when
// prefetches outnumber demands, or one credit every dpp demands otherwise;
// each prefetch issued spends one. pf_allow is high while credit remains, or
// always when enable is low (non-adaptive prefetching).
//
// The 8-period history, the 30 % margin and the 1.125 increase come from the
// design description; the Little's-law latency, the EMA weight, the exact
// decrease formula and its bounds, the rate limits, the credit gate and the
// sampling period are this design's choices.
module bw_adapt #(
  parameter int unsigned SAMPLE_CYCLES = 4096,
  parameter int unsigned HIST          = 8,
  parameter int unsigned NOISE_PCT     = 130,
  parameter int unsigned INC_SHIFT     = 3,     // increase by 1/8
  parameter int unsigned DEGREE        = 4,     // starting and maximum rate
  parameter int unsigned RATE_MIN      = 8,     // 1/32 prefetch per demand
  parameter int unsigned DEC_MIN       = 16,    // decrease bounds, 1/256 units
  parameter int unsigned DEC_MAX       = 128,
  parameter int unsigned CREDIT_MAX    = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        ev_demand_total,
  input  logic        ev_demand_issued,
  input  logic        ev_demand_returned,
  input  logic        ev_prefetch_issued,
  output logic        pf_allow,
  output logic [15:0] rate,          // prefetches per demand, Q8.8
  output logic [15:0] ppd,           // prefetches per demand, integer
  output logic [15:0] dpp,           // demands per prefetch, integer
  output logic        pgd,           // prefetches greater than demands
  output logic [31:0] lat_avg,       // cycles, Q.4
  output logic [31:0] lat_min,       // cycles, Q.4
  output logic [15:0] accuracy,      // Q8
  output logic        congested,
  output logic        sample_done    // one pulse when the new rate is in place
);

  localparam logic [15:0] RATE_MAX = 16'(DEGREE << 8);
  localparam int unsigned SCW = $clog2(SAMPLE_CYCLES + 1);

  // ---- event counters, instantaneous values
  logic [SCW-1:0] cyc;
  logic [31:0] c_total, c_issued, c_returned, c_pf, c_latsum;
  logic [15:0] outstanding;
  wire sample_end = (cyc == SCW'(SAMPLE_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= '0;
      c_total <= '0; c_issued <= '0; c_returned <= '0; c_pf <= '0; c_latsum <= '0;
      outstanding <= '0;
    end else begin
      outstanding <= outstanding + 16'(ev_demand_issued) - 16'(ev_demand_returned);
      cyc <= sample_end ? '0 : cyc + 1'b1;
      if (sample_end) begin
        // the events of this cycle open the next period
        c_total    <= 32'(ev_demand_total);
        c_issued   <= 32'(ev_demand_issued);
        c_returned <= 32'(ev_demand_returned);
        c_pf       <= 32'(ev_prefetch_issued);
        c_latsum   <= 32'(outstanding);
      end else begin
        c_total    <= c_total    + 32'(ev_demand_total);
        c_issued   <= c_issued   + 32'(ev_demand_issued);
        c_returned <= c_returned + 32'(ev_demand_returned);
        c_pf       <= c_pf       + 32'(ev_prefetch_issued);
        c_latsum   <= c_latsum   + 32'(outstanding);
      end
    end
  end

  // ---- per-sample computation
  typedef enum logic [2:0] {A_IDLE, A_LAT, A_EMA, A_ACC, A_EXC, A_RATE, A_DPP} astate_e;
  astate_e st;

  logic [31:0] s_total, s_issued, s_returned, s_pf;
  logic [31:0] lat_inst, excess;
  logic [31:0] hist [HIST];
  logic [HIST-1:0] hist_v;

  logic        div_start, div_done;
  logic [31:0] div_a, div_b, div_q;

  serial_div #(.W(32)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_a), .divisor(div_b),
    .busy(), .done(div_done), .quot(div_q)
  );

  wire [31:0] hits = (s_total > s_issued) ? s_total - s_issued : 32'd0;
  wire        cong_now = (64'(lat_avg) * 64'd100) > (64'(lat_min) * 64'(NOISE_PCT));

  // rate update arithmetic
  logic [31:0] dec_q8, rate_dec, rate_inc;
  always_comb begin
    logic [41:0] prod;
    prod   = 42'(excess) * 42'(32'd512 - 32'(accuracy));
    dec_q8 = (prod >> 9) > 42'(DEC_MAX) ? 32'(DEC_MAX) : 32'(prod >> 9);
    if (dec_q8 < 32'(DEC_MIN)) dec_q8 = 32'(DEC_MIN);
    rate_dec = 32'(rate) - ((32'(rate) * dec_q8) >> 8);
    if (rate_dec < 32'(RATE_MIN)) rate_dec = 32'(RATE_MIN);
    rate_inc = 32'(rate) + (((32'(rate) >> INC_SHIFT) == 0) ? 32'd1 : (32'(rate) >> INC_SHIFT));
    if (rate_inc > 32'(RATE_MAX)) rate_inc = 32'(RATE_MAX);
  end

  logic [15:0] new_rate;
  assign new_rate = !enable ? RATE_MAX : (congested ? 16'(rate_dec) : 16'(rate_inc));

  always_comb begin
    div_start = 1'b0;
    div_a = '0;
    div_b = '1;
    unique case (st)
      A_IDLE: if (sample_end) begin
        div_start = 1'b1;
        div_a = {c_latsum[27:0], 4'b0};
        div_b = (c_returned == 0) ? 32'd1 : c_returned;
      end
      A_EMA: begin
        div_start = 1'b1;
        div_a = {hits[23:0], 8'b0};
        div_b = (s_pf == 0) ? 32'd1 : s_pf;
      end
      A_ACC: if (div_done) begin
        div_start = 1'b1;
        div_a = {(lat_avg > lat_min) ? (lat_avg - lat_min) : 32'd0} << 8;
        div_b = (lat_min == 0) ? 32'd1 : lat_min;
      end
      A_RATE: begin
        div_start = 1'b1;
        div_a = 32'd65536;
        div_b = 32'(new_rate);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE;
      s_total <= '0; s_issued <= '0; s_returned <= '0; s_pf <= '0;
      lat_inst <= '0; lat_avg <= '0; lat_min <= '0; excess <= '0;
      for (int i = 0; i < HIST; i++) hist[i] <= '0;
      hist_v <= '0;
      accuracy <= 16'd256;
      rate <= RATE_MAX;
      dpp <= 16'd1;
      congested <= 1'b0;
      sample_done <= 1'b0;
    end else begin
      sample_done <= 1'b0;
      unique case (st)
        A_IDLE: if (sample_end) begin
          s_total <= c_total; s_issued <= c_issued; s_returned <= c_returned;
          s_pf <= c_pf;
          st <= A_LAT;
        end
        A_LAT: if (div_done) begin
          lat_inst <= (s_returned == 0) ? lat_avg : div_q;
          st <= A_EMA;
        end
        A_EMA: begin
          // moving average, then the history of averages and its minimum
          logic [31:0] nav;
          if (s_returned == 0) nav = lat_avg;
          else if (hist_v == '0) nav = lat_inst;
          else nav = 32'($signed({1'b0, lat_avg}) + (($signed({1'b0, lat_inst}) - $signed({1'b0, lat_avg})) >>> 2));
          lat_avg <= nav;
          if (s_returned != 0) begin
            for (int i = HIST - 1; i > 0; i--) hist[i] <= hist[i-1];
            hist[0] <= nav;
            hist_v <= {hist_v[HIST-2:0], 1'b1};
            lat_min <= hist_min_last(nav);
          end
          st <= A_ACC;
        end
        A_ACC: if (div_done) begin
          accuracy <= (s_pf == 0 || div_q > 32'd256) ? 16'd256 : 16'(div_q);
          congested <= cong_now && (s_returned != 0);
          st <= A_EXC;
        end
        A_EXC: if (div_done) begin
          excess <= div_q;
          st <= A_RATE;
        end
        A_RATE: begin
          rate <= new_rate;
          st <= A_DPP;
        end
        A_DPP: if (div_done) begin
          dpp <= (div_q > 32'hFFFF) ? 16'hFFFF : ((div_q == 0) ? 16'd1 : 16'(div_q));
          sample_done <= 1'b1;
          st <= A_IDLE;
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  // minimum of the new average and the HIST-1 most recent older averages
  function automatic logic [31:0] hist_min_last(logic [31:0] nav);
    logic [31:0] m;
    m = nav;
    for (int i = 0; i < HIST - 1; i++)
      if (hist_v[i] && hist[i] < m) m = hist[i];
    return m;
  endfunction

  assign ppd = rate >> 8;
  assign pgd = (rate >= 16'd256);

  // ---- issue gate
  logic [7:0] credit;
  logic [15:0] dcount;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credit <= '0;
      dcount <= '0;
    end else begin
      logic [8:0] c;
      c = {1'b0, credit};
      if (ev_demand_total) begin
        if (pgd) c = c + 9'(ppd);
        else if (dcount + 1'b1 >= dpp) c = c + 9'd1;
        if (!pgd) dcount <= (dcount + 1'b1 >= dpp) ? '0 : dcount + 1'b1;
      end
      if (ev_prefetch_issued && enable && c != 0) c = c - 9'd1;
      credit <= (c > 9'(CREDIT_MAX)) ? 8'(CREDIT_MAX) : c[7:0];
    end
  end

  assign pf_allow = !enable || (credit != 0);

endmodule
