// Self-checking testbench of internal_bus: requests to each internal block
// reach only that block with the local address, its answer comes back to
// the master, and an address above the last block is answered with err.
module tb_internal_bus;
  import ctrl_pkg::*;

  localparam int unsigned N = 3;
  localparam int unsigned AW = 16;

  lbus_req_t m_req;
  lbus_rsp_t m_rsp;
  lbus_req_t s_req [N];
  lbus_rsp_t s_rsp [N];
  int checks = 0, failures = 0;

  internal_bus #(.N_SLV(N), .SLV_AW(AW)) dut (.m_req, .m_rsp, .s_req, .s_rsp);

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      s_rsp[i].ack   = 1'b1;
      s_rsp[i].err   = 1'b0;
      s_rsp[i].rdata = 32'hA000_0000 + 32'(i);
    end
    for (int t = 0; t < 200; t++) begin
      int unsigned blk;
      logic [15:0] off;
      blk = $urandom_range(0, N);
      off = 16'($urandom);
      m_req.req   = 1'b1;
      m_req.we    = 1'($urandom);
      m_req.wdata = $urandom;
      m_req.addr  = {16'(blk), off};
      #1;
      for (int i = 0; i < N; i++) begin
        expect_eq("slave req", s_req[i].req, (i == blk));
        if (i == blk) begin
          expect_eq("local addr", s_req[i].addr, {16'h0, off});
          expect_eq("we", s_req[i].we, m_req.we);
          expect_eq("wdata", s_req[i].wdata, m_req.wdata);
        end
      end
      if (blk < N) begin
        expect_eq("rdata", m_rsp.rdata, 32'hA000_0000 + 32'(blk));
        expect_eq("ack", m_rsp.ack, 1);
        expect_eq("err", m_rsp.err, 0);
      end else begin
        expect_eq("unmapped err", m_rsp.err, 1);
      end
    end
    m_req.req = 1'b0;
    m_req.addr = 32'h0009_0000;
    #1;
    expect_eq("no err when idle", m_rsp.err, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
