// Root-complex agent: the CXL.mem side of a compute node.
//
// Requests of the root complex (demand reads and writes, dirty DRAM-cache
// victims, core prefetches, DRAM-cache prefetches and promotions) are turned
// into link messages: a memory read, a memory write or a promotion, stamped
// with this node's number, and with a prefetch mark on everything that is not
// a demand so the FAM controller can queue it apart. A sub-page mark tells a
// DRAM-cache block from a 64 B line. Messages wait in a FIFO of OUT_DEPTH
// entries until the link takes them. Read completions coming back are decoded
// into demand data or prefetch data for the root complex without buffering.
//
// The design description names the agent and its role; the message fields, the FIFO and
// its depth are this design's own, and no flit packing or link layer is
// modelled.
module cxl_agent
  import cxl_dc_pkg::*;
#(
  parameter int unsigned NODE_ID   = 0,
  parameter int unsigned OUT_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  // from the root complex
  input  logic     rc_req_valid,
  output logic     rc_req_ready,
  input  fam_req_t rc_req,
  // to the link
  output logic     link_req_valid,
  input  logic     link_req_ready,
  output m2s_req_t link_req,
  // from the link
  input  logic     link_rsp_valid,
  output logic     link_rsp_ready,
  input  s2m_rsp_t link_rsp,
  // to the root complex
  output logic     rc_rsp_valid,
  input  logic     rc_rsp_ready,
  output fam_rsp_t rc_rsp
);

  m2s_req_t msg;

  always_comb begin
    msg.addr     = rc_req.addr;
    msg.tag      = rc_req.tag;
    msg.node     = NODE_W'(NODE_ID);
    msg.dc_block = rc_req.sub_page;
    unique case (rc_req.op)
      FAM_DEM_RD:  begin msg.opc = M2S_MEM_RD;  msg.pf_hint = 1'b0; end
      FAM_DEM_WR:  begin msg.opc = M2S_MEM_WR;  msg.pf_hint = 1'b0; end
      FAM_CORE_PF: begin msg.opc = M2S_MEM_RD;  msg.pf_hint = 1'b1; end
      FAM_DC_PF:   begin msg.opc = M2S_MEM_RD;  msg.pf_hint = 1'b1; msg.dc_block = 1'b1; end
      FAM_PROMOTE: begin msg.opc = M2S_PROMOTE; msg.pf_hint = 1'b1; msg.dc_block = 1'b1; end
      default:     begin msg.opc = M2S_MEM_RD;  msg.pf_hint = 1'b0; end
    endcase
  end

  logic empty, full;

  sync_fifo #(.T(m2s_req_t), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n,
    .push(rc_req_valid && !full), .wr_data(msg),
    .pop(link_req_valid && link_req_ready), .rd_data(link_req),
    .empty, .full, .count()
  );

  assign rc_req_ready   = !full;
  assign link_req_valid = !empty;

  always_comb begin
    rc_rsp.addr = link_rsp.addr;
    rc_rsp.tag  = link_rsp.tag;
    rc_rsp.node = link_rsp.node;
    if (link_rsp.pf_hint && link_rsp.dc_block) rc_rsp.op = FAM_DC_PF;
    else if (link_rsp.pf_hint)                 rc_rsp.op = FAM_CORE_PF;
    else                                       rc_rsp.op = FAM_DEM_RD;
  end
  assign rc_rsp_valid   = link_rsp_valid;
  assign link_rsp_ready = rc_rsp_ready;

endmodule
