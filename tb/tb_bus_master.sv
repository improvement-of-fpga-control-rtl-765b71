// Self-checking testbench of bus_master against a register model with two
// cycles of extra latency: write then read back, a bus error from an
// unmapped address, a timeout from a slave that never answers, and the
// cycle count from start to done in each case (LAT + 2 cycles for an
// answered access, TIMEOUT cycles for an unanswered one).
module tb_bus_master;
  import ctrl_pkg::*;

  localparam int unsigned LAT     = 2;
  localparam int unsigned TIMEOUT = 16;

  logic clk = 0, rst_n = 0;
  logic start = 0, we = 0, busy, done, err;
  logic [31:0] addr = 0, wdata = 0, rdata;
  lbus_req_t bus_req;
  lbus_rsp_t bus_rsp;
  int unsigned rd_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bus_master #(.TIMEOUT(TIMEOUT)) dut (
    .clk, .rst_n, .start, .we, .addr, .wdata, .busy, .done, .err, .rdata,
    .bus_req, .bus_rsp
  );

  tb_reg_slave #(.LAT(LAT), .WORDS(64), .NOACK_ADDR('h3F0)) u_slave (
    .clk, .rst_n, .req (bus_req), .rsp (bus_rsp), .rd_count
  );

  task automatic access(input logic w, input logic [31:0] a, input logic [31:0] d,
                        output logic e, output logic [31:0] q, output int cyc);
    @(negedge clk);
    start = 1; we = w; addr = a; wdata = d;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    e = err; q = rdata;
  endtask

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    logic [31:0] q;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      access(1'b1, 32'(i + 3), 32'hC0DE_0000 + 32'(i * 7), e, q, cyc);
      expect_eq("write err", e, 0);
      expect_eq("write cycles", cyc, LAT + 2);
    end
    for (int i = 0; i < 8; i++) begin
      access(1'b0, 32'(i + 3), 0, e, q, cyc);
      expect_eq("read err", e, 0);
      expect_eq("read data", q, 32'hC0DE_0000 + 32'(i * 7));
      expect_eq("read cycles", cyc, LAT + 2);
    end
    access(1'b0, 32'h100, 0, e, q, cyc);
    expect_eq("unmapped read err", e, 1);
    access(1'b1, 32'h100, 5, e, q, cyc);
    expect_eq("unmapped write err", e, 1);
    access(1'b0, 32'h3F0, 0, e, q, cyc);
    expect_eq("timeout err", e, 1);
    expect_eq("timeout cycles", cyc, TIMEOUT);
    expect_eq("idle after timeout", busy, 0);
    access(1'b0, 32'd3, 0, e, q, cyc);
    expect_eq("read after timeout", q, 32'hC0DE_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
