// Self-checking testbench of rmw_alu: every operation with directed corner
// values (wrap-around of increment and decrement) and random operands,
// compared with results computed here.
module tb_rmw_alu;
  import ctrl_pkg::*;

  alu_op_e     op;
  logic [31:0] orig, arg, result;
  int checks = 0, failures = 0;

  rmw_alu dut (.op, .orig, .arg, .result);

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] a, logic [31:0] b);
    case (o)
      ALU_INC: return a + 1;
      ALU_DEC: return a - 1;
      ALU_ADD: return a + b;
      ALU_SUB: return a - b;
      ALU_AND: return a & b;
      ALU_OR:  return a | b;
      ALU_XOR: return a ^ b;
      default: return a;
    endcase
  endfunction

  task automatic check(alu_op_e o, logic [31:0] a, logic [31:0] b, logic [31:0] exp);
    op = o; orig = a; arg = b;
    #1;
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL op=%0d orig=%h arg=%h result=%h expected=%h", o, a, b, result, exp);
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
    check(ALU_INC, 32'hFFFF_FFFF, 32'h1234, 32'h0);
    check(ALU_DEC, 32'h0, 32'h1234, 32'hFFFF_FFFF);
    check(ALU_INC, 32'd41, 32'd100, 32'd42);
    check(ALU_DEC, 32'd43, 32'd100, 32'd42);
    check(ALU_ADD, 32'd40, 32'd2, 32'd42);
    check(ALU_SUB, 32'd44, 32'd2, 32'd42);
    check(ALU_SUB, 32'd0, 32'd1, 32'hFFFF_FFFF);
    check(ALU_AND, 32'hF0F0_F0F0, 32'hFF00_FF00, 32'hF000_F000);
    check(ALU_OR,  32'hF0F0_F0F0, 32'h0F00_0000, 32'hFFF0_F0F0);
    check(ALU_XOR, 32'hAAAA_5555, 32'hFFFF_0000, 32'h5555_5555);
    for (int i = 0; i < 500; i++) begin
      alu_op_e o;
      logic [31:0] a, b;
      o = alu_op_e'($urandom_range(0, 6));
      a = $urandom;
      b = $urandom;
      check(o, a, b, ref_alu(o, a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
