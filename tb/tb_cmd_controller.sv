// Self-checking testbench of cmd_controller with testbench models of its
// three neighbours: a queue in place of the input buffer, a one-cycle bus
// (done the cycle after start) over a register array, and an output buffer
// that stalls writes and flush acknowledgements at random and records each
// response packet as its words followed by the trailer.
//
// Register model: 0x00-0xFF read/write, 0x11 a status register whose bit 7
// reads as 1 from the READY-th read after the last write to 0x10, 0xF0-0xFF
// readable but rejecting writes, and everything from 0x100 up a bus error.
// Every command, address mode, ALU and test operation used, every exception
// code, SYNC, standard mode, discarding of the rest of a failed list and the
// MTEST retry spacing (interval + 5 cycles with this bus) are checked
// against values worked out here.
module tb_cmd_controller;
  import ctrl_pkg::*;

  localparam int unsigned READY = 3;

  logic clk = 0, rst_n = 0, std_mode = 0;
  logic ib_valid = 0, ib_last = 0, ib_rd;
  logic [31:0] ib_data = 0;
  logic bm_start, bm_we, bm_busy = 0, bm_done = 0, bm_err = 0;
  logic [31:0] bm_addr, bm_wdata, bm_rdata = 0;
  logic ob_wr, ob_full = 0, ob_flush_req, ob_flush_ack = 0;
  logic [31:0] ob_wdata;
  pkt_kind_e ob_flush_kind;
  exc_e ob_flush_exc;
  logic [23:0] ob_flush_index, cur_index;
  logic busy;

  int checks = 0, failures = 0;
  logic [32:0] ibq [$];
  logic [31:0] rx [$];
  int rx_pkts = 0;
  logic [31:0] regs [256];
  int stat_reads = 0;
  logic we_q;
  logic [31:0] addr_q, wdata_q;
  longint stat_times [$];
  int stall_pct = 30;

  always #5 clk = ~clk;

  cmd_controller dut (
    .clk, .rst_n, .std_mode,
    .ib_valid, .ib_data, .ib_last, .ib_rd,
    .bm_start, .bm_we, .bm_addr, .bm_wdata, .bm_busy, .bm_done, .bm_err, .bm_rdata,
    .ob_wr, .ob_wdata, .ob_full, .ob_flush_req, .ob_flush_kind, .ob_flush_exc,
    .ob_flush_index, .ob_flush_ack, .cur_index, .busy
  );

  // ---- input buffer model ----
  always @(negedge clk) begin
    ib_valid = (ibq.size() != 0);
    {ib_last, ib_data} = ib_valid ? ibq[0] : 33'h0;
  end
  always @(posedge clk) if (ib_rd) void'(ibq.pop_front());

  // ---- bus model ----
  always @(posedge clk) begin
    bm_done <= 1'b0;
    if (bm_start) begin
      bm_busy <= 1'b1;
      we_q    <= bm_we;
      addr_q  <= bm_addr;
      wdata_q <= bm_wdata;
      if (!bm_we && bm_addr == 32'h11) stat_times.push_back($time / 10);
    end else if (bm_busy) begin
      bm_busy <= 1'b0;
      bm_done <= 1'b1;
      bm_err  <= 1'b0;
      if (addr_q >= 32'h100 || (we_q && addr_q >= 32'hF0)) begin
        bm_err   <= 1'b1;
        bm_rdata <= 32'h0;
      end else if (we_q) begin
        regs[addr_q[7:0]] <= wdata_q;
        if (addr_q == 32'h10) stat_reads = 0;
      end else if (addr_q == 32'h11) begin
        stat_reads++;
        bm_rdata <= (stat_reads >= READY) ? 32'h80 : 32'h0;
      end else begin
        bm_rdata <= regs[addr_q[7:0]];
      end
    end
  end

  // ---- output buffer model ----
  always @(negedge clk) begin
    ob_full      = ($urandom_range(1, 100) <= stall_pct);
    ob_flush_ack = ob_flush_req && ($urandom_range(1, 100) > stall_pct);
  end
  always @(posedge clk) begin
    if (ob_wr) begin
      if (ob_full) begin
        failures++;
        $display("FAIL write to a full output buffer");
      end
      rx.push_back(ob_wdata);
    end
    if (ob_flush_req && ob_flush_ack) begin
      rx.push_back(32'({ob_flush_kind, ob_flush_exc, ob_flush_index}));
      rx_pkts++;
    end
  end

  // ---- helpers ----
  function automatic logic [31:0] H(opcode_e op, logic [3:0] sub, int len = 0);
    return {op, sub, 8'h00, 16'(len)};
  endfunction

  task automatic send(logic [31:0] w [$]);
    foreach (w[i]) ibq.push_back({(i == w.size() - 1), w[i]});
  endtask

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic wait_pkts(int n);
    while (rx_pkts < n) @(negedge clk);
  endtask

  // Take one packet off the received stream and compare it.
  task automatic expect_pkt(string what, logic [31:0] words [$], pkt_kind_e k, exc_e e,
                            logic [23:0] idx);
    trailer_t t;
    foreach (words[i]) begin
      expect_eq({what, " word"}, (rx.size() != 0) ? rx[0] : 32'hDEAD_BEEF, words[i]);
      if (rx.size() != 0) void'(rx.pop_front());
    end
    t = trailer_t'((rx.size() != 0) ? rx.pop_front() : 32'h0);
    expect_eq({what, " kind"}, t.kind, k);
    expect_eq({what, " exc"}, t.exc, e);
    expect_eq({what, " index"}, t.index, idx);
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (ibq.size() != 0 || busy) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w [$];
    int np;
    foreach (regs[i]) regs[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    np = 0;

    // ---- 1: a successful list with SYNC in the middle ----
    send('{H(OP_WRITE, AM_INC, 3), 32'h20, 32'hA, 32'hB, 32'hC,
           H(OP_READ, AM_INC, 3), 32'h20,
           H(OP_READ, AM_DEC, 2), 32'h22,
           H(OP_WRITE, AM_KEEP, 2), 32'h30, 32'hE1, 32'hE2,
           H(OP_READ, AM_KEEP, 1), 32'h30,
           H(OP_RMW, ALU_ADD), 32'h20, 32'd5,
           H(OP_READ, AM_INC, 1), 32'h20,
           H(OP_RMW, ALU_INC), 32'h21,
           H(OP_WRITE, AM_INC, 1), 32'h10, 32'hA0,
           H(OP_MTEST, T_ANDEQ), 32'd5, 32'd4, 32'h11, 32'h80, 32'h80,
           H(OP_TEST, T_UGT), 32'h22, 32'hB,
           H(OP_SYNC, 0),
           H(OP_RMW, ALU_XOR), 32'h21, 32'hFF,
           H(OP_READ, AM_INC, 1), 32'h21});
    wait_pkts(np + 2); np += 2;
    expect_pkt("list1 sync", '{32'hA, 32'hB, 32'hC, 32'hC, 32'hB, 32'hE2, 32'hA, 32'hF, 32'hB,
                               32'h11, 32'd2, 32'h80}, PKT_SYNC, EXC_NONE, 24'd11);
    expect_pkt("list1 done", '{32'hC, 32'hC ^ 32'hFF}, PKT_DONE, EXC_NONE, 24'd14);
    expect_eq("mtest trials", stat_times.size(), READY);
    for (int i = 1; i < stat_times.size(); i++)
      expect_eq("mtest spacing", stat_times[i] - stat_times[i-1], 4 + 5);
    wait_idle();

    // ---- 2: write bus error; the rest of the list is discarded ----
    send('{H(OP_READ, AM_INC, 1), 32'h20,
           H(OP_WRITE, AM_INC, 2), 32'hEF, 32'h55, 32'h66,
           H(OP_WRITE, AM_INC, 1), 32'h20, 32'h77});
    wait_pkts(np + 1); np += 1;
    expect_pkt("wr err", '{32'hF, 32'hF0, 32'h66}, PKT_EXC, EXC_WR_BUS, 24'd1);
    wait_idle();
    send('{H(OP_READ, AM_INC, 1), 32'h20});
    wait_pkts(np + 1); np += 1;
    expect_pkt("after discard", '{32'hF}, PKT_DONE, EXC_NONE, 24'd1);
    wait_idle();

    // ---- 3: read bus error in a block read ----
    send('{H(OP_READ, AM_DEC, 3), 32'h101, H(OP_SYNC, 0)});
    wait_pkts(np + 1); np += 1;
    expect_pkt("rd err", '{32'h101}, PKT_EXC, EXC_RD_BUS, 24'd0);
    wait_idle();

    // ---- 4: RMW read error and RMW write error ----
    send('{H(OP_RMW, ALU_INC), 32'h180});
    wait_pkts(np + 1); np += 1;
    expect_pkt("rmw rd err", '{32'h180, 32'h0, 32'h0}, PKT_EXC, EXC_RMW_RD_BUS, 24'd0);
    wait_idle();
    send('{H(OP_RMW, ALU_SUB), 32'hF4, 32'd3});
    wait_pkts(np + 1); np += 1;
    expect_pkt("rmw wr err", '{32'hF4, 32'h0, 32'hFFFF_FFFD}, PKT_EXC, EXC_RMW_WR_BUS, 24'd0);
    wait_idle();

    // ---- 5: single test fails ----
    send('{H(OP_RMW, ALU_OR), 32'h40, 32'hF0, H(OP_TEST, T_OREQ), 32'h40, 32'h0F, 32'hFE});
    wait_pkts(np + 1); np += 1;
    expect_pkt("test fail", '{32'h0, 32'h40, H(OP_TEST, T_OREQ), 32'h0F, 32'hFE, 32'hF0},
               PKT_EXC, EXC_TEST_FAIL, 24'd1);
    wait_idle();

    // ---- 6: multiple test runs out of retries ----
    stat_times.delete();
    send('{H(OP_WRITE, AM_INC, 1), 32'h10, 32'hA0,
           H(OP_MTEST, T_SGT), 32'd1, 32'd0, 32'h11, 32'h7F});
    wait_pkts(np + 1); np += 1;
    expect_pkt("mtest fail", '{32'h11, H(OP_MTEST, T_SGT), 32'h7F, 32'h0, 32'h0},
               PKT_EXC, EXC_MTEST_FAIL, 24'd1);
    expect_eq("mtest fail trials", stat_times.size(), 2);
    wait_idle();

    // ---- 7: unknown command and truncated command ----
    send('{32'hF000_0000, H(OP_READ, AM_INC, 1), 32'h20});
    wait_pkts(np + 1); np += 1;
    expect_pkt("bad cmd", '{32'hF000_0000}, PKT_EXC, EXC_BAD_CMD, 24'd0);
    wait_idle();
    send('{H(OP_WRITE, AM_INC, 3), 32'h50, 32'h1, 32'h2});
    wait_pkts(np + 1); np += 1;
    expect_pkt("trunc", '{H(OP_WRITE, AM_INC, 3)}, PKT_EXC, EXC_TRUNC, 24'd0);
    wait_idle();
    send('{H(OP_READ, AM_INC, 2), 32'h50});
    wait_pkts(np + 1); np += 1;
    expect_pkt("trunc wrote", '{32'h1, 32'h2}, PKT_DONE, EXC_NONE, 24'd1);
    wait_idle();

    // ---- 8: standard mode, one response per command ----
    std_mode = 1;
    send('{H(OP_READ, AM_INC, 1), 32'h20, H(OP_TEST, T_ULT), 32'h20, 32'h10,
           H(OP_READ, AM_INC, 1), 32'h21});
    wait_pkts(np + 3); np += 3;
    expect_pkt("std 0", '{32'hF}, PKT_CMD, EXC_NONE, 24'd0);
    expect_pkt("std 1", '{}, PKT_CMD, EXC_NONE, 24'd1);
    expect_pkt("std 2", '{32'hC ^ 32'hFF}, PKT_DONE, EXC_NONE, 24'd3);
    wait_idle();
    std_mode = 0;
    expect_eq("nothing left", rx.size(), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
