// Self-checking testbench of input_buffer: words of a packet are not
// offered to the controller before the packet's last word is stored, several
// packets queue up and come out in order with their last flags, a full
// buffer stops the link (in_ready low), and reading with random gaps keeps
// the order. DEPTH is reduced to 16 to reach the full condition quickly.
module tb_input_buffer;
  import ctrl_pkg::*;

  localparam int unsigned DEPTH = 16;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [31:0] in_data = 0;
  logic rd_valid, rd_last, rd_en = 0;
  logic [31:0] rd_data;
  int checks = 0, failures = 0;
  logic [32:0] expq [$];

  always #5 clk = ~clk;

  input_buffer #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last,
    .rd_valid, .rd_data, .rd_last, .rd_en
  );

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic push(logic [31:0] d, logic l);
    @(negedge clk);
    in_valid = 1; in_data = d; in_last = l;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1 in_valid = 0;
    expq.push_back({l, d});
  endtask

  task automatic pop_all(int gap);
    while (expq.size() != 0) begin
      logic [32:0] e;
      @(negedge clk);
      if (rd_valid && ($urandom_range(0, gap) == 0)) begin
        e = expq.pop_front();
        expect_eq("data", rd_data, e[31:0]);
        expect_eq("last", rd_last, e[32]);
        rd_en = 1;
        @(posedge clk);
        #1 rd_en = 0;
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // a packet in progress is not visible
    push(32'h100, 0); push(32'h101, 0); push(32'h102, 0);
    repeat (3) @(negedge clk);
    expect_eq("no partial packet", rd_valid, 0);
    push(32'h103, 1);
    @(negedge clk);
    expect_eq("packet visible", rd_valid, 1);
    // a second packet behind it
    push(32'h200, 0); push(32'h201, 1);
    pop_all(0);
    @(negedge clk);
    expect_eq("empty after packets", rd_valid, 0);
    // fill to the brim: DEPTH words of one packet, then the link stalls
    for (int i = 0; i < DEPTH; i++) push(32'h300 + 32'(i), (i == DEPTH - 1));
    @(negedge clk);
    expect_eq("full stalls link", in_ready, 0);
    pop_all(2);
    // random packets with random read gaps
    for (int p = 0; p < 20; p++) begin
      int n;
      n = $urandom_range(1, 5);
      for (int i = 0; i < n; i++) push($urandom, (i == n - 1));
      if (p % 3 == 2) pop_all(3);
    end
    pop_all(1);
    expect_eq("in_ready when empty", in_ready, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
