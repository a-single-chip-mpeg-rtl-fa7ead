// mm_bridge: bus bridge from one media module to the main bus.
// Two requesters inside the module, the processor core's load/store port and the
// DMA controller, share the module's single master port on the main bus. A
// two-way round-robin arbiter picks one; the choice is held until the main bus
// acknowledges, and the ack and read data go back to that requester only. The
// architecture names the bridge; this arbitration is this design's choice.
// Timing: adds one cycle (the choice is registered) ahead of the main bus request.
module mm_bridge
  import codec_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t core_req,
  output bus_rsp_t core_rsp,
  input  bus_req_t dma_req,
  output bus_rsp_t dma_rsp,
  output bus_req_t mb_req,
  input  bus_rsp_t mb_rsp
);
  logic       active_q, sel_q;
  logic [1:0] gnt;
  logic       gidx, gvalid;

  rr_arbiter #(.N(2)) u_arb (
    .clk, .rst_n, .req({dma_req.req, core_req.req}), .advance(!active_q),
    .gnt, .gnt_idx(gidx), .gnt_valid(gvalid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q <= 1'b0; sel_q <= 1'b0;
    end else if (!active_q) begin
      if (gvalid) begin active_q <= 1'b1; sel_q <= gidx; end
    end else if (mb_rsp.ack) begin
      active_q <= 1'b0;
    end
  end

  always_comb begin
    mb_req   = sel_q ? dma_req : core_req;
    mb_req.req = active_q;
    core_rsp = '{ack: 1'b0, rdata: mb_rsp.rdata};
    dma_rsp  = '{ack: 1'b0, rdata: mb_rsp.rdata};
    if (active_q && !sel_q) core_rsp.ack = mb_rsp.ack;
    if (active_q &&  sel_q) dma_rsp.ack  = mb_rsp.ack;
  end
endmodule
