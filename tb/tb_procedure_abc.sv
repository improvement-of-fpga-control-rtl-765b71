// Workload testbench: a three-stage configuration procedure driven the
// list-at-a-time way, plus the classic single handshake with a timeout.
//
// Part 1. Stages A, B and C each configure one internal block and end with
// a final test. The host keeps two flags per stage, "completed" and
// "failed". It builds one list holding every stage not yet completed, with
// a recovery step in front of each stage that failed last time. It sends the
// list and reads the responses. From the index of a failed command it marks
// the stages before it as completed and that stage as failed, then builds
// and sends a new list. Block 1 (stage B) answers its status register with
// "ready" only on the 6th read, so B's first final test (4 trials) fails and
// B succeeds on the second list. Checked: exactly two lists; stage A is not
// repeated (its run counter, kept in block 0 and bumped by RMW, ends at 1);
// stage B's recovery ran once; all configuration data is in place; the
// success records report the expected retry counts.
//
// Part 2. Write 0xa0 to 0x10, wait up to 10 us for bit 7 of 0x11, then
// write 0x00 to 0x10. It runs against a block that never sets the bit. The
// clock is assumed to be 100 MHz, so 10 us is 1000 cycles: 99 retries with
// an interval of 2 give 100 trials of 10 cycles on a block with 2 cycles of
// extra latency (L + 6 + interval per trial). Checked: the exception
// arrives no earlier than 1000 cycles after the list starts, reports the
// status address, and the final write 0x00 never happens.
module tb_procedure_abc;
  import ctrl_pkg::*;

  localparam int unsigned NB = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [31:0] in_data = 0;
  logic out_valid, out_ready, out_last;
  logic [31:0] out_data;
  logic busy;
  lbus_req_t s_req [NB];
  lbus_rsp_t s_rsp [NB];
  int unsigned rd_count [NB];

  int checks = 0, failures = 0;
  logic [31:0] rx [$];
  int pkt_lens [$];
  int rx_len = 0;

  always #5 clk = ~clk;
  assign out_ready = 1'b1;

  fpga_ctrl_top dut (
    .clk, .rst_n, .std_mode (1'b0),
    .in_valid, .in_ready, .in_data, .in_last,
    .out_valid, .out_ready, .out_data, .out_last,
    .busy, .s_req, .s_rsp
  );

  // stage A: ready at once; stage B: ready on the 6th status read; stage C:
  // ready on the 2nd. Block 2 also serves part 2 through address 0x21, which
  // never reads as ready (it is an ordinary register holding 0).
  tb_reg_slave #(.LAT(0), .WORDS(256), .READY_AFTER(1)) u_a (
    .clk, .rst_n, .req (s_req[0]), .rsp (s_rsp[0]), .rd_count (rd_count[0]));
  tb_reg_slave #(.LAT(1), .WORDS(256), .READY_AFTER(6), .CTRL_ADDR('hFFFF)) u_b (
    .clk, .rst_n, .req (s_req[1]), .rsp (s_rsp[1]), .rd_count (rd_count[1]));
  tb_reg_slave #(.LAT(2), .WORDS(256), .READY_AFTER(2), .CTRL_ADDR('hFFFF)) u_c (
    .clk, .rst_n, .req (s_req[2]), .rsp (s_rsp[2]), .rd_count (rd_count[2]));

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      rx.push_back(out_data);
      rx_len++;
      if (out_last) begin
        pkt_lens.push_back(rx_len);
        rx_len = 0;
      end
    end
  end

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
      in_valid = 1; in_data = w[i]; in_last = (i == w.size() - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1 in_valid = 0; in_last = 0;
    end
  endtask

  // Wait for the packets of one list; return its data words and final trailer.
  task automatic collect(output logic [31:0] data [$], output trailer_t t);
    data = {};
    forever begin
      int len;
      while (pkt_lens.size() == 0) @(negedge clk);
      len = pkt_lens.pop_front();
      for (int i = 0; i < len - 1; i++) data.push_back(rx.pop_front());
      t = trailer_t'(rx.pop_front());
      if (t.kind == PKT_DONE || t.kind == PKT_EXC) break;
    end
  endtask

  // Commands of one stage: recovery (if it failed before), configuration,
  // final test. Returns how many commands were added.
  function automatic int add_stage(int s, logic failed, ref logic [31:0] l [$]);
    int n;
    n = 0;
    if (failed) begin
      // prepare for retrying: bump the stage's recovery counter
      l = {l, H(OP_RMW, ALU_INC), A(s, 'h31)};
      n++;
    end
    // configuration: four words, and a run counter kept in block 0
    l = {l, H(OP_WRITE, AM_INC, 4), A(s, 'h40), 32'(s * 16 + 1), 32'(s * 16 + 2),
         32'(s * 16 + 3), 32'(s * 16 + 4)};
    l = {l, H(OP_RMW, ALU_INC), A(0, 'h50 + s)};
    // final test: up to 4 trials for bit 7 of the stage's status register
    l = {l, H(OP_MTEST, T_ANDEQ), 32'd3, 32'd2, A(s, 'h11), 32'h80, 32'h80};
    n += 3;
    return n;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic completed [3], failed [3];
    int first_cmd [3];
    int lists, recoveries;
    logic [31:0] l [$], got [$];
    trailer_t t;
    longint t0, t1;

    foreach (completed[i]) begin completed[i] = 0; failed[i] = 0; end
    repeat (4) @(posedge clk);
    rst_n = 1;

    // ---------------- part 1: stages A, B, C ----------------
    lists = 0;
    recoveries = 0;
    while (!(completed[0] && completed[1] && completed[2]) && lists < 5) begin
      int n, stage_of_exc;
      l = {};
      n = 0;
      for (int s = 0; s < 3; s++) begin
        first_cmd[s] = completed[s] ? -1 : n;
        if (!completed[s]) begin
          if (failed[s]) recoveries++;
          n += add_stage(s, failed[s], l);
        end
      end
      send(l);
      lists++;
      collect(got, t);
      if (t.kind == PKT_DONE) begin
        foreach (completed[s]) completed[s] = 1;
      end else begin
        // which stage holds the failing command?
        stage_of_exc = -1;
        for (int s = 0; s < 3; s++)
          if (first_cmd[s] >= 0 && t.index >= 24'(first_cmd[s])) stage_of_exc = s;
        for (int s = 0; s < 3; s++) begin
          if (first_cmd[s] >= 0 && s < stage_of_exc) completed[s] = 1;
          failed[s] = (s == stage_of_exc);
        end
        // only a failed final test may be corrected; anything else is fatal
        expect_eq("exception may be corrected", t.exc, EXC_MTEST_FAIL);
        if (t.exc != EXC_MTEST_FAIL) break;
        expect_eq("failing stage is B", stage_of_exc, 1);
      end
      // success records of this list: stage A reports 0 retries, C 1 retry
      if (lists == 1) begin
        // list 1: A's record, then B's failure record (5 words)
        // (each stage's run-counter RMW returns its old value first)
        expect_eq("list1 words", got.size(), 1 + 3 + 1 + 5);
        if (got.size() == 10) begin
          expect_eq("A record addr", got[1], A(0, 'h11));
          expect_eq("A retries", got[2], 0);
          expect_eq("B fail addr", got[5], A(1, 'h11));
          expect_eq("B fail value", got[9], 0);
        end
      end else if (lists == 2) begin
        // list 2: B's recovery RMW original, B's run counter and record,
        // C's run counter and record
        expect_eq("list2 words", got.size(), 1 + 1 + 3 + 1 + 3);
        if (got.size() == 9) begin
          expect_eq("B recovery original", got[0], 0);
          expect_eq("B run counter before", got[1], 1);
          expect_eq("B retries", got[3], 1);
          expect_eq("C record addr", got[6], A(2, 'h11));
          expect_eq("C retries", got[7], 1);
        end
      end
    end
    expect_eq("lists sent", lists, 2);
    expect_eq("recoveries", recoveries, 1);
    expect_eq("stage A run once", u_a.regs['h50], 1);
    expect_eq("stage B run twice", u_a.regs['h51], 2);
    expect_eq("stage C run once", u_a.regs['h52], 1);
    expect_eq("B recovery counter", u_b.regs['h31], 1);
    for (int s = 0; s < 3; s++)
      for (int k = 0; k < 4; k++)
        expect_eq("config data",
                  (s == 0) ? u_a.regs['h40 + k] : (s == 1) ? u_b.regs['h40 + k] : u_c.regs['h40 + k],
                  s * 16 + k + 1);
    expect_eq("B status reads", rd_count[1], 6);

    // ---------------- part 2: handshake with a 10 us timeout ----------------
    t0 = $time / 10;
    send('{H(OP_WRITE, AM_INC, 1), A(2, 'h10), 32'hA0,
           H(OP_MTEST, T_ANDEQ), 32'd99, 32'd2, A(2, 'h21), 32'h80, 32'h80,
           H(OP_WRITE, AM_INC, 1), A(2, 'h10), 32'h00});
    collect(got, t);
    t1 = $time / 10;
    expect_eq("timeout kind", t.kind, PKT_EXC);
    expect_eq("timeout exc", t.exc, EXC_MTEST_FAIL);
    expect_eq("timeout index", t.index, 1);
    expect_eq("timeout record addr", (got.size() != 0) ? got[0] : 0, A(2, 'h21));
    expect_eq("waited at least 10 us", (t1 - t0) >= 1000, 1);
    expect_eq("waited at most 12 us", (t1 - t0) <= 1200, 1);
    expect_eq("control left at 0xa0", u_c.regs['h10], 32'hA0);
    $display("procedure: %0d lists, handshake timeout after %0d cycles", lists, t1 - t0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
