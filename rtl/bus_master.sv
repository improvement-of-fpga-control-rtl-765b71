// Local-bus master of the controller.
//
// Performs one read or write on the internal bus per request and reports its
// outcome, so that the controller can turn a local-bus error into an
// exception. The concept only states that local-bus errors are detected; the
// bus protocol and the error sources are this design's choice:
//   * a request is held on the bus (req, we, addr, wdata stable) until the
//     slave answers with ack (success) or err (bus error) for one cycle;
//   * if no answer comes within TIMEOUT cycles the access ends as a bus
//     error too, so an absent or hung slave cannot stall the command list.
// Controller side: pulse start for one cycle while busy is low; done pulses
// one cycle after the slave's answer (or the timeout), with err and rdata
// valid in that cycle. A transfer thus takes (slave latency + 1) cycles from
// start to done.
module bus_master
  import ctrl_pkg::*;
#(
  parameter int unsigned TIMEOUT = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // controller side
  input  logic              start,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic              busy,
  output logic              done,
  output logic              err,
  output logic [DATA_W-1:0] rdata,
  // internal bus side
  output lbus_req_t         bus_req,
  input  lbus_rsp_t         bus_rsp
);

  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  logic [TW-1:0] wait_cnt;

  assign busy = bus_req.req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_req  <= '0;
      done     <= 1'b0;
      err      <= 1'b0;
      rdata    <= '0;
      wait_cnt <= '0;
    end else begin
      done <= 1'b0;
      if (!bus_req.req) begin
        if (start) begin
          bus_req.req   <= 1'b1;
          bus_req.we    <= we;
          bus_req.addr  <= addr;
          bus_req.wdata <= wdata;
          wait_cnt      <= '0;
        end
      end else if (bus_rsp.ack || bus_rsp.err) begin
        bus_req.req <= 1'b0;
        done        <= 1'b1;
        err         <= bus_rsp.err;
        rdata       <= bus_rsp.rdata;
      end else if (wait_cnt == TW'(TIMEOUT - 1)) begin
        bus_req.req <= 1'b0;
        done        <= 1'b1;
        err         <= 1'b1;
        rdata       <= '0;
      end else begin
        wait_cnt <= wait_cnt + TW'(1);
      end
    end
  end

  // A new request may only be started while the bus is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> !busy);
  // Request fields stay stable while waiting for the slave.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 bus_req.req && !(bus_rsp.ack || bus_rsp.err) && !done
                                 |=> (!bus_req.req || $stable(bus_req.addr)));

endmodule
