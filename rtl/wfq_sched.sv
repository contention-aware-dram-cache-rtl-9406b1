// Weighted fair choice between the demand and the prefetch queue of the FAM
// controller: a work-conserving deficit weighted round robin.
//
// Issue slots are grouped in windows of W+1 rounds; a round counter advances
// by one on every slot, modulo W+1. Round 0 prefers prefetches, the W other
// rounds prefer demands, so under load demands and prefetches are served
// W : 1. In its preferred round a class first earns QUANTUM deficit (only
// while below its maximum). A demand may issue with a positive deficit and
// costs 1; a prefetch may issue when its deficit is at least r, the ratio of
// its block size to the 64 B demand block, and costs r, so a 256 B DRAM-cache
// prefetch counts four times a line-sized core prefetch. When the preferred
// class cannot issue, the other one is tried with the deficit it has.
//
// The round structure, the deficit rules and the block-size ratio follow the
// design's issue algorithm; where its text asks for a prefetch deficit "at
// least" r and its pseudo code for "greater than" r, the text is followed.
// QUANTUM and the deficit limits are this design's choices.
//
// Timing: on a cycle with slot high the decision is combinational on
// issue_demand / issue_prefetch and the counters update at the clock edge.
module wfq_sched #(
  parameter int unsigned W            = 2,   // demand weight
  parameter int unsigned QUANTUM      = 4,
  parameter int unsigned MAX_DEM_DEF  = 8,
  parameter int unsigned MAX_PF_DEF   = 8,
  parameter int unsigned DEF_W        = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       slot,          // one issue opportunity
  input  logic       dq_nonempty,
  input  logic       pq_nonempty,
  input  logic [3:0] pq_ratio,      // block ratio r of the prefetch at the head
  output logic       issue_demand,
  output logic       issue_prefetch,
  output logic [$clog2(W+1)-1:0] round,
  output logic [DEF_W-1:0] demand_deficit,
  output logic [DEF_W-1:0] prefetch_deficit
);

  localparam int unsigned RW = $clog2(W + 1);

  logic [RW-1:0]    round_n;
  logic [DEF_W-1:0] dd, pd;

  always_comb begin
    round_n = (round == RW'(W)) ? '0 : round + 1'b1;
    dd = demand_deficit;
    pd = prefetch_deficit;
    issue_demand   = 1'b0;
    issue_prefetch = 1'b0;
    if (round_n != '0) begin
      if (dd < DEF_W'(MAX_DEM_DEF)) dd = dd + DEF_W'(QUANTUM);
      if (dq_nonempty && dd > 0) begin
        issue_demand = 1'b1;
        dd = dd - 1'b1;
      end else if (pq_nonempty && pd >= DEF_W'(pq_ratio)) begin
        issue_prefetch = 1'b1;
        pd = pd - DEF_W'(pq_ratio);
      end
    end else begin
      if (pd < DEF_W'(MAX_PF_DEF)) pd = pd + DEF_W'(QUANTUM);
      if (pq_nonempty && pd >= DEF_W'(pq_ratio)) begin
        issue_prefetch = 1'b1;
        pd = pd - DEF_W'(pq_ratio);
      end else if (dq_nonempty && dd > 0) begin
        issue_demand = 1'b1;
        dd = dd - 1'b1;
      end
    end
    if (!slot) begin
      issue_demand   = 1'b0;
      issue_prefetch = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      round            <= '0;
      demand_deficit   <= '0;
      prefetch_deficit <= '0;
    end else if (slot) begin
      round            <= round_n;
      demand_deficit   <= dd;
      prefetch_deficit <= pd;
    end
  end

  a_one_class: assert property (@(posedge clk) disable iff (!rst_n)
    !(issue_demand && issue_prefetch));

endmodule
