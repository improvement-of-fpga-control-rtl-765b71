// Behavioural model of an internal block on the internal bus, for
// testbenches only.
//
// WORDS registers answer after LAT extra cycles (ack one cycle after the
// request when LAT = 0). Any address at or above WORDS is answered with err,
// except NOACK_ADDR, which is never answered, so that the master's timeout
// can be exercised. The register at STAT_ADDR is read only and models a
// handshake status: bit 7 reads as 1 once READY_AFTER reads of it have been
// made since the last write to CTRL_ADDR (CTRL_ADDR = 0x10, STAT_ADDR = 0x11
// as in the classic "write 0xa0, wait for bit 7, write 0x00" sequence).
// All registers reset to zero; rd_count counts reads of STAT_ADDR.
module tb_reg_slave
  import ctrl_pkg::*;
#(
  parameter int unsigned LAT         = 0,
  parameter int unsigned WORDS       = 256,
  parameter int unsigned READY_AFTER = 3,
  parameter logic [ADDR_W-1:0] CTRL_ADDR  = 'h10,
  parameter logic [ADDR_W-1:0] STAT_ADDR  = 'h11,
  parameter logic [ADDR_W-1:0] NOACK_ADDR = 'hFFF0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  lbus_req_t req,
  output lbus_rsp_t rsp,
  output int unsigned rd_count
);

  logic [DATA_W-1:0] regs [WORDS];
  int unsigned cnt;
  int unsigned stat_reads;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp        <= '0;
      cnt        <= 0;
      stat_reads <= 0;
      rd_count   <= 0;
      for (int i = 0; i < WORDS; i++) regs[i] <= '0;
    end else begin
      rsp.ack <= 1'b0;
      rsp.err <= 1'b0;
      if (req.req && !(rsp.ack || rsp.err) && req.addr != NOACK_ADDR) begin
        if (cnt == LAT) begin
          cnt <= 0;
          if (req.addr >= ADDR_W'(WORDS)) begin
            rsp.err   <= 1'b1;
            rsp.rdata <= '0;
          end else if (req.we) begin
            rsp.ack <= 1'b1;
            if (req.addr != STAT_ADDR) regs[req.addr] <= req.wdata;
            if (req.addr == CTRL_ADDR) stat_reads <= 0;
          end else begin
            rsp.ack <= 1'b1;
            if (req.addr == STAT_ADDR) begin
              rsp.rdata  <= (stat_reads + 1 >= READY_AFTER) ? 32'h80 : 32'h00;
              stat_reads <= stat_reads + 1;
              rd_count   <= rd_count + 1;
            end else begin
              rsp.rdata <= regs[req.addr];
            end
          end
        end else begin
          cnt <= cnt + 1;
        end
      end else begin
        cnt <= 0;
      end
    end
  end

endmodule
