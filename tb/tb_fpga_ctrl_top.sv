// End-to-end testbench of fpga_ctrl_top at its default parameters.
//
// A host model sends command lists as packets over the input stream (with
// random gaps between words) and collects the response packets (with random
// back-pressure). Three register models sit on the internal bus with 0, 1
// and 3 cycles of extra latency; block 0 holds the control/status pair at
// 0x10/0x11 whose bit 7 comes up on the third status read after a write of
// the control register, and an address that never answers.
//
// The lists run the classic handshake sequence (write 0xa0 to 0x10, wait for
// bit 7 of 0x11, write 0x00 to 0x10) as one multiple-read-and-test, a block
// write and read back longer than the output buffer, all address modes and
// RMW operations, tests that pass and fail, SYNC, bus errors from an
// unmapped block and from a block that never answers, an unknown and a
// truncated command, discarding of the rest of a failed list, and standard
// mode. The expected words come from a mirror of the registers kept here.
// Each mechanism is counted, and one that never happened counts as a
// failure.
module tb_fpga_ctrl_top;
  import ctrl_pkg::*;

  localparam int unsigned NB = 3;
  localparam int unsigned OBUF = 256;   // default output buffer depth
  localparam int unsigned BLK  = 300;   // block transfer longer than OBUF

  logic clk = 0, rst_n = 0, std_mode = 0;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [31:0] in_data = 0;
  logic out_valid, out_ready = 0, out_last;
  logic [31:0] out_data;
  logic busy;
  lbus_req_t s_req [NB];
  lbus_rsp_t s_rsp [NB];
  int unsigned rd_count [NB];

  int checks = 0, failures = 0;
  logic [31:0] rx [$];
  int rx_pkts = 0;
  int rx_len = 0;
  int pkt_lens [$];
  int all_lens [$];

  // mechanism counters
  int n_full = 0, n_sync = 0, n_done = 0, n_std = 0, n_retry = 0, n_mtest_ok = 0;
  int n_exc [16];
  int n_wait_pkt = 0, n_stall_out = 0, n_timeout = 0;
  longint stat_t [$];
  logic stat_prev = 0;

  always #5 clk = ~clk;

  fpga_ctrl_top dut (
    .clk, .rst_n, .std_mode,
    .in_valid, .in_ready, .in_data, .in_last,
    .out_valid, .out_ready, .out_data, .out_last,
    .busy, .s_req, .s_rsp
  );

  tb_reg_slave #(.LAT(0), .WORDS(1024), .READY_AFTER(3)) u_blk0 (
    .clk, .rst_n, .req (s_req[0]), .rsp (s_rsp[0]), .rd_count (rd_count[0]));
  tb_reg_slave #(.LAT(1), .WORDS(1024), .STAT_ADDR('hFFFF_FFFF), .CTRL_ADDR('hFFFF_FFFF))
    u_blk1 (.clk, .rst_n, .req (s_req[1]), .rsp (s_rsp[1]), .rd_count (rd_count[1]));
  tb_reg_slave #(.LAT(3), .WORDS(64), .STAT_ADDR('hFFFF_FFFF), .CTRL_ADDR('hFFFF_FFFF))
    u_blk2 (.clk, .rst_n, .req (s_req[2]), .rsp (s_rsp[2]), .rd_count (rd_count[2]));

  // ---- link receive side ----
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (rst_n && out_valid && !out_ready) n_stall_out++;
    if (rst_n && out_valid && out_ready) begin
      rx.push_back(out_data);
      rx_len++;
      if (out_last) begin
        rx_pkts++;
        pkt_lens.push_back(rx_len);
        all_lens.push_back(rx_len);
        rx_len = 0;
      end
    end
    // a packet is arriving but its words are held back from the controller
    if (dut.u_ibuf.count != 0 && !dut.u_ibuf.rd_valid) n_wait_pkt++;
    if (dut.u_bm.bus_req.req && dut.u_bm.wait_cnt == 9'h0FF) n_timeout++;
    // start times of status-register reads (MTEST trials)
    if (s_req[0].req && !s_req[0].we && s_req[0].addr == 32'h11 && !stat_prev)
      stat_t.push_back($time / 10);
    stat_prev = s_req[0].req;
  end

  // ---- helpers ----
  function automatic logic [31:0] H(opcode_e op, logic [3:0] sub, int len = 0);
    return {op, sub, 8'h00, 16'(len)};
  endfunction

  function automatic logic [31:0] A(int blk, int off);
    return {16'(blk), 16'(off)};
  endfunction

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic send(logic [31:0] w [$]);
    foreach (w[i]) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1; in_data = w[i]; in_last = (i == w.size() - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1 in_valid = 0; in_last = 0;
    end
  endtask

  // Collect the packets of one list (up to a DONE or EXC trailer): data
  // words into 'data', trailers into 'trl'.
  task automatic collect(output logic [31:0] data [$], output trailer_t trl [$]);
    trailer_t t;
    data = {};
    trl  = {};
    forever begin
      while (rx_pkts == 0) @(negedge clk);
      rx_pkts--;
      while (1) begin
        logic [31:0] w;
        int len;
        w = rx.pop_front();
        len = pkt_lens[0];
        if (len == 1) begin
          void'(pkt_lens.pop_front());
          t = trailer_t'(w);
          trl.push_back(t);
          unique case (t.kind)
            PKT_FULL: n_full++;
            PKT_SYNC: n_sync++;
            PKT_DONE: n_done++;
            PKT_CMD:  n_std++;
            PKT_EXC:  n_exc[t.exc]++;
            default: ;
          endcase
          break;
        end
        pkt_lens[0] = len - 1;
        data.push_back(w);
      end
      if (t.kind == PKT_DONE || t.kind == PKT_EXC) break;
    end
  endtask

  task automatic check_words(string what, logic [31:0] got [$], logic [31:0] exp [$]);
    expect_eq({what, " word count"}, got.size(), exp.size());
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      expect_eq({what, " word"}, got[i], exp[i]);
  endtask

  task automatic check_trl(string what, trailer_t t, pkt_kind_e k, exc_e e, int idx);
    expect_eq({what, " kind"}, t.kind, k);
    expect_eq({what, " exc"}, t.exc, e);
    expect_eq({what, " index"}, t.index, idx);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] cmd [$], exp [$], got [$];
    trailer_t trl [$];
    logic [31:0] blkdata [BLK];
    logic [31:0] v;
    int full_pkts;

    foreach (n_exc[i]) n_exc[i] = 0;
    foreach (blkdata[i]) blkdata[i] = $urandom;
    if (blkdata[0] == 32'h8000_0000) blkdata[0] = 32'h1;  // keeps test 16 passing
    repeat (4) @(posedge clk);
    rst_n = 1;

    // ---- list 1: handshake sequence, long block transfer, RMW, SYNC ----
    cmd = '{H(OP_WRITE, AM_INC, 1), A(0, 'h10), 32'hA0,
            H(OP_MTEST, T_ANDEQ), 32'd99, 32'd8, A(0, 'h11), 32'h80, 32'h80,
            H(OP_WRITE, AM_INC, 1), A(0, 'h10), 32'h00,
            H(OP_WRITE, AM_INC, BLK), A(1, 'h100)};
    foreach (blkdata[i]) cmd.push_back(blkdata[i]);
    cmd = {cmd,
           H(OP_READ, AM_INC, BLK), A(1, 'h100),               // 4
           H(OP_READ, AM_DEC, 3), A(1, 'h102),                 // 5
           H(OP_WRITE, AM_KEEP, 4), A(2, 5), 32'd10, 32'd20, 32'd30, 32'd40,
           H(OP_READ, AM_KEEP, 1), A(2, 5),                    // 7
           H(OP_RMW, ALU_SUB), A(2, 5), 32'd1,                 // 8: 40 -> 39
           H(OP_RMW, ALU_ADD), A(2, 5), 32'd100,               // 9: 39 -> 139
           H(OP_RMW, ALU_AND), A(2, 5), 32'h0F,                // 10: 139 -> 0xB
           H(OP_RMW, ALU_OR), A(2, 5), 32'h30,                 // 11: 0xB -> 0x3B
           H(OP_RMW, ALU_XOR), A(2, 5), 32'hFF,                // 12: 0x3B -> 0xC4
           H(OP_RMW, ALU_INC), A(2, 5),                        // 13: -> 0xC5
           H(OP_RMW, ALU_DEC), A(2, 5),                        // 14: -> 0xC4
           H(OP_TEST, T_SLT), A(2, 5), 32'h100,                // 15 pass
           H(OP_TEST, T_SGT), A(1, 'h100), 32'h8000_0000,      // 16 pass unless min
           H(OP_TEST, T_OREQ), A(2, 5), 32'h0F, 32'hCF,        // 17 pass
           H(OP_SYNC, 0),                                      // 18
           H(OP_READ, AM_INC, 1), A(2, 5)};                    // 19
    send(cmd);
    exp = '{A(0, 'h11), 32'd2, 32'h80};
    foreach (blkdata[i]) exp.push_back(blkdata[i]);
    exp = {exp, blkdata[2], blkdata[1], blkdata[0], 32'd40,
           32'd40, 32'd39, 32'd139, 32'h0B, 32'h3B, 32'hC4, 32'hC5, 32'hC4};
    collect(got, trl);
    check_words("list1", got, exp);
    expect_eq("list1 packets", trl.size(), 3);
    if (trl.size() == 3) begin
      check_trl("list1 full", trl[0], PKT_FULL, EXC_NONE, 4);
      check_trl("list1 sync", trl[1], PKT_SYNC, EXC_NONE, 18);
      check_trl("list1 done", trl[2], PKT_DONE, EXC_NONE, 20);
    end
    expect_eq("full packet length", all_lens[0], OBUF + 1);
    expect_eq("status reads", rd_count[0], 3);
    // trials of a multiple read-and-test repeat every interval + 6 cycles
    // with a zero-latency block (5 cycles of trial, 1 of re-issue)
    expect_eq("trial count", stat_t.size(), 3);
    for (int i = 1; i < stat_t.size(); i++)
      expect_eq("trial spacing", stat_t[i] - stat_t[i-1], 8 + 6);
    if (got.size() >= 2) begin
      n_mtest_ok++;
      n_retry += got[1];
    end

    // ---- list 2: unmapped block; rest of the list discarded ----
    send('{H(OP_READ, AM_INC, 1), A(1, 'h101),
           H(OP_READ, AM_INC, 1), A(3, 'h0),
           H(OP_WRITE, AM_INC, 1), A(2, 7), 32'h5555});
    collect(got, trl);
    check_words("list2", got, '{blkdata[1], A(3, 0)});
    check_trl("list2", trl[$], PKT_EXC, EXC_RD_BUS, 1);

    // ---- list 3: block that never answers (bus timeout) ----
    send('{H(OP_WRITE, AM_INC, 1), A(0, 'hFFF0), 32'h1234});
    collect(got, trl);
    check_words("list3", got, '{A(0, 'hFFF0), 32'h1234});
    check_trl("list3", trl[$], PKT_EXC, EXC_WR_BUS, 0);

    // ---- list 4: failing test; the discarded write never happened ----
    send('{H(OP_TEST, T_UGT), A(2, 7), 32'd5, H(OP_SYNC, 0)});
    collect(got, trl);
    check_words("list4", got, '{A(2, 7), H(OP_TEST, T_UGT), 32'd5, 32'd0, 32'd0});
    check_trl("list4", trl[$], PKT_EXC, EXC_TEST_FAIL, 0);

    // ---- list 5: multiple test out of retries, RMW to unmapped block ----
    send('{H(OP_WRITE, AM_INC, 1), A(0, 'h10), 32'hA0,
           H(OP_MTEST, T_ANDEQ), 32'd1, 32'd3, A(0, 'h11), 32'h80, 32'h80});
    collect(got, trl);
    check_words("list5", got, '{A(0, 'h11), H(OP_MTEST, T_ANDEQ), 32'h80, 32'h80, 32'h0});
    check_trl("list5", trl[$], PKT_EXC, EXC_MTEST_FAIL, 1);
    send('{H(OP_RMW, ALU_INC), A(5, 0)});
    collect(got, trl);
    check_words("list5b", got, '{A(5, 0), 32'h0, 32'h0});
    check_trl("list5b", trl[$], PKT_EXC, EXC_RMW_RD_BUS, 0);

    // ---- list 6: unknown and truncated commands ----
    send('{32'h9000_0000});
    collect(got, trl);
    check_words("list6", got, '{32'h9000_0000});
    check_trl("list6", trl[$], PKT_EXC, EXC_BAD_CMD, 0);
    send('{H(OP_READ, AM_INC, 1), A(2, 8), H(OP_RMW, ALU_ADD), A(2, 8)});
    collect(got, trl);
    check_words("list6b", got, '{32'h0, H(OP_RMW, ALU_ADD)});
    check_trl("list6b", trl[$], PKT_EXC, EXC_TRUNC, 1);

    // ---- list 7: standard mode ----
    std_mode = 1;
    send('{H(OP_READ, AM_INC, 1), A(2, 5),
           H(OP_WRITE, AM_INC, 1), A(2, 6), 32'h77,
           H(OP_READ, AM_INC, 1), A(2, 6)});
    collect(got, trl);
    check_words("list7", got, '{32'hC4, 32'h77});
    expect_eq("list7 packets", trl.size(), 3);
    if (trl.size() == 3) begin
      check_trl("list7 a", trl[0], PKT_CMD, EXC_NONE, 0);
      check_trl("list7 b", trl[1], PKT_CMD, EXC_NONE, 1);
      check_trl("list7 c", trl[2], PKT_DONE, EXC_NONE, 3);
    end
    std_mode = 0;

    // ---- mechanism coverage ----
    $display("mechanisms: full=%0d sync=%0d done=%0d std=%0d mtest_ok=%0d retries=%0d",
             n_full, n_sync, n_done, n_std, n_mtest_ok, n_retry);
    $display("  exc wr=%0d rd=%0d rmw_rd=%0d test=%0d mtest=%0d bad=%0d trunc=%0d",
             n_exc[EXC_WR_BUS], n_exc[EXC_RD_BUS], n_exc[EXC_RMW_RD_BUS],
             n_exc[EXC_TEST_FAIL], n_exc[EXC_MTEST_FAIL], n_exc[EXC_BAD_CMD], n_exc[EXC_TRUNC]);
    $display("  packet wait cycles=%0d output stalls=%0d timeouts=%0d",
             n_wait_pkt, n_stall_out, n_timeout);
    expect_eq("seen full flush", n_full > 0, 1);
    expect_eq("seen sync", n_sync > 0, 1);
    expect_eq("seen done", n_done > 0, 1);
    expect_eq("seen standard mode", n_std > 0, 1);
    expect_eq("seen mtest success", n_mtest_ok > 0, 1);
    expect_eq("seen retries", n_retry > 0, 1);
    expect_eq("seen write bus error", n_exc[EXC_WR_BUS] > 0, 1);
    expect_eq("seen read bus error", n_exc[EXC_RD_BUS] > 0, 1);
    expect_eq("seen rmw bus error", n_exc[EXC_RMW_RD_BUS] > 0, 1);
    expect_eq("seen test failure", n_exc[EXC_TEST_FAIL] > 0, 1);
    expect_eq("seen mtest failure", n_exc[EXC_MTEST_FAIL] > 0, 1);
    expect_eq("seen bad command", n_exc[EXC_BAD_CMD] > 0, 1);
    expect_eq("seen truncated list", n_exc[EXC_TRUNC] > 0, 1);
    expect_eq("seen packet wait", n_wait_pkt > 0, 1);
    expect_eq("seen output stall", n_stall_out > 0, 1);
    expect_eq("seen bus timeout", n_timeout > 0, 1);
    expect_eq("nothing left", rx.size(), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
