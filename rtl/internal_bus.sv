// Internal bus of the controlled FPGA: one master, N_SLV internal blocks.
//
// Routes the controller's local-bus request to one internal block by
// address and returns that block's answer. The upper address bits
// (addr[ADDR_W-1:SLV_AW]) select the block, the lower SLV_AW bits are passed
// on as the address inside it (upper bits cleared). A request to an address
// that selects no block is answered at once with err, which the controller
// reports as a local-bus error. The topology (a controller on a shared
// internal bus with several internal blocks) follows the concept's system
// drawing; the address map, block count and decode are this design's
// choice. Purely combinational: it adds no cycle to an access.
module internal_bus
  import ctrl_pkg::*;
#(
  parameter int unsigned N_SLV  = 3,
  parameter int unsigned SLV_AW = 16
) (
  input  lbus_req_t m_req,
  output lbus_rsp_t m_rsp,
  output lbus_req_t s_req [N_SLV],
  input  lbus_rsp_t s_rsp [N_SLV]
);

  localparam int unsigned SW = ADDR_W - SLV_AW;

  logic [SW-1:0] sel;
  logic          hit;

  assign sel = m_req.addr[ADDR_W-1:SLV_AW];
  assign hit = (sel < SW'(N_SLV));

  always_comb begin
    m_rsp = '0;
    for (int i = 0; i < N_SLV; i++) begin
      s_req[i]       = m_req;
      s_req[i].req   = m_req.req && (sel == SW'(i));
      s_req[i].addr  = {{SW{1'b0}}, m_req.addr[SLV_AW-1:0]};
      if (sel == SW'(i)) m_rsp = s_rsp[i];
    end
    if (m_req.req && !hit) begin
      m_rsp.err = 1'b1;
    end
  end

endmodule
