// Controlled-FPGA side of a host link: command-list controller plus the
// internal bus to the controlled blocks.
//
// The host sends command packets over a fast but high-latency link; they
// are stored whole in the input buffer, executed by the command controller
// through the bus master on the internal bus, and the results come back as
// response packets built by the output buffer. The arrangement (host link,
// controller, internal bus, internal blocks) follows the concept's system
// drawing; the internal blocks themselves are application specific and are
// outside this module: their bus ports are the s_req/s_rsp arrays.
//
// Interface: in_* is the command stream from the link (valid/ready, last on
// the final word of a packet), out_* the response stream (last on the
// trailer), std_mode selects one response per command, busy is high while a
// list executes. Parameters: buffer depths, bus timeout, number and address
// width of the internal blocks. The defaults are this design's choice.
module fpga_ctrl_top
  import ctrl_pkg::*;
#(
  parameter int unsigned IBUF_DEPTH  = 1024,
  parameter int unsigned OBUF_DEPTH  = 256,
  parameter int unsigned BUS_TIMEOUT = 256,
  parameter int unsigned N_SLV       = 3,
  parameter int unsigned SLV_AW      = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              std_mode,
  // command packets from the communication interface
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_last,
  // response packets to the communication interface
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic              out_last,
  output logic              busy,
  // internal blocks
  output lbus_req_t         s_req [N_SLV],
  input  lbus_rsp_t         s_rsp [N_SLV]
);

  logic              ib_valid, ib_last, ib_rd;
  logic [DATA_W-1:0] ib_data;

  logic              bm_start, bm_we, bm_busy, bm_done, bm_err;
  logic [ADDR_W-1:0] bm_addr;
  logic [DATA_W-1:0] bm_wdata, bm_rdata;

  logic              ob_wr, ob_full, ob_flush_req, ob_flush_ack;
  logic [DATA_W-1:0] ob_wdata;
  pkt_kind_e         ob_flush_kind;
  exc_e              ob_flush_exc;
  logic [23:0]       ob_flush_index, cur_index;

  lbus_req_t         m_req;
  lbus_rsp_t         m_rsp;

  input_buffer #(.DEPTH(IBUF_DEPTH)) u_ibuf (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_last,
    .rd_valid (ib_valid), .rd_data (ib_data), .rd_last (ib_last),
    .rd_en (ib_rd)
  );

  cmd_controller u_ctrl (
    .clk, .rst_n, .std_mode,
    .ib_valid, .ib_data, .ib_last, .ib_rd,
    .bm_start, .bm_we, .bm_addr, .bm_wdata,
    .bm_busy, .bm_done, .bm_err, .bm_rdata,
    .ob_wr, .ob_wdata, .ob_full,
    .ob_flush_req, .ob_flush_kind, .ob_flush_exc, .ob_flush_index,
    .ob_flush_ack, .cur_index,
    .busy
  );

  output_buffer #(.DEPTH(OBUF_DEPTH)) u_obuf (
    .clk, .rst_n,
    .wr_en (ob_wr), .wr_data (ob_wdata), .full (ob_full),
    .flush_req (ob_flush_req), .flush_kind (ob_flush_kind),
    .flush_exc (ob_flush_exc), .flush_index (ob_flush_index),
    .flush_ack (ob_flush_ack), .cur_index,
    .out_valid, .out_ready, .out_data, .out_last
  );

  bus_master #(.TIMEOUT(BUS_TIMEOUT)) u_bm (
    .clk, .rst_n,
    .start (bm_start), .we (bm_we), .addr (bm_addr), .wdata (bm_wdata),
    .busy (bm_busy), .done (bm_done), .err (bm_err), .rdata (bm_rdata),
    .bus_req (m_req), .bus_rsp (m_rsp)
  );

  internal_bus #(.N_SLV(N_SLV), .SLV_AW(SLV_AW)) u_bus (
    .m_req, .m_rsp, .s_req, .s_rsp
  );

endmodule
