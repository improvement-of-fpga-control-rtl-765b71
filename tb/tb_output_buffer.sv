// Self-checking testbench of output_buffer: an explicit flush sends the
// stored words followed by a trailer with the requested kind, exception
// code and index; a flush of an empty buffer sends only the trailer; a full
// buffer sends a PKT_FULL packet on its own; the link may stall (out_ready
// low) at random; and a packet of n words takes n + 1 cycles with the link
// always ready. DEPTH is reduced to 8.
module tb_output_buffer;
  import ctrl_pkg::*;

  localparam int unsigned DEPTH = 8;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, full;
  logic [31:0] wr_data = 0;
  logic flush_req = 0, flush_ack;
  pkt_kind_e flush_kind = PKT_DONE;
  exc_e flush_exc = EXC_NONE;
  logic [23:0] flush_index = 0, cur_index = 0;
  logic out_valid, out_ready = 1, out_last;
  logic [31:0] out_data;
  int checks = 0, failures = 0;
  logic [31:0] rx [$];
  int rx_pkts = 0;
  int ready_pct = 100;

  always #5 clk = ~clk;

  output_buffer #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .wr_en, .wr_data, .full,
    .flush_req, .flush_kind, .flush_exc, .flush_index, .flush_ack, .cur_index,
    .out_valid, .out_ready, .out_data, .out_last
  );

  // link side: collect words, count packets
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      rx.push_back(out_data);
      if (out_last) rx_pkts++;
    end
  end
  always @(negedge clk) out_ready = ($urandom_range(1, 100) <= ready_pct);

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic write(logic [31:0] d);
    @(negedge clk);
    while (full) @(negedge clk);
    wr_en = 1; wr_data = d;
    @(posedge clk);
    #1 wr_en = 0;
  endtask

  task automatic flush(pkt_kind_e k, exc_e e, logic [23:0] idx);
    @(negedge clk);
    flush_req = 1; flush_kind = k; flush_exc = e; flush_index = idx;
    #1;
    while (!flush_ack) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1 flush_req = 0;
  endtask

  task automatic wait_pkts(int n);
    while (rx_pkts < n) @(negedge clk);
  endtask

  task automatic expect_pkt(logic [31:0] words [$], pkt_kind_e k, exc_e e, logic [23:0] idx);
    trailer_t t;
    expect_eq("packet length", rx.size(), words.size() + 1);
    for (int i = 0; i < words.size() && i < rx.size(); i++)
      expect_eq("packet word", rx[i], words[i]);
    t = trailer_t'(rx[rx.size() - 1]);
    expect_eq("trailer kind", t.kind, k);
    expect_eq("trailer exc", t.exc, e);
    expect_eq("trailer index", t.index, idx);
    rx.delete();
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w [$];
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 3 words + exception trailer; time the drain with the link ready
    w = '{32'h11, 32'h22, 32'h33};
    foreach (w[i]) write(w[i]);
    flush(PKT_EXC, EXC_TEST_FAIL, 24'd7);
    t0 = $time;
    wait_pkts(1);
    t1 = $time;
    expect_pkt(w, PKT_EXC, EXC_TEST_FAIL, 24'd7);
    expect_eq("drain cycles", (t1 - t0) / 10, 4);
    // empty flush: trailer only
    w = {};
    flush(PKT_SYNC, EXC_NONE, 24'd2);
    wait_pkts(2);
    expect_pkt(w, PKT_SYNC, EXC_NONE, 24'd2);
    // overflow: DEPTH + 3 words produce a FULL packet then a DONE packet
    ready_pct = 40;
    cur_index = 24'd5;
    for (int i = 0; i < DEPTH + 3; i++) write(32'h500 + 32'(i));
    wait_pkts(3);
    w = {};
    for (int i = 0; i < DEPTH; i++) w.push_back(32'h500 + 32'(i));
    expect_pkt(w, PKT_FULL, EXC_NONE, 24'd5);
    flush(PKT_DONE, EXC_NONE, 24'd9);
    wait_pkts(4);
    w = '{32'h508, 32'h509, 32'h50A};
    expect_pkt(w, PKT_DONE, EXC_NONE, 24'd9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
