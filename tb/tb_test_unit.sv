// Self-checking testbench of test_unit: directed cases that separate the
// signed from the unsigned comparisons, equality at the strict comparisons,
// both mask tests, and random values checked against conditions computed
// here.
module tb_test_unit;
  import ctrl_pkg::*;

  test_op_e    op;
  logic [31:0] value, arg0, arg1;
  logic        pass;
  int checks = 0, failures = 0;

  test_unit dut (.op, .value, .arg0, .arg1, .pass);

  function automatic logic ref_test(test_op_e o, logic [31:0] v, logic [31:0] a, logic [31:0] b);
    int signed sv, sa;
    sv = v; sa = a;
    case (o)
      T_SLT:   return sv < sa;
      T_ULT:   return v < a;
      T_SGT:   return sv > sa;
      T_UGT:   return v > a;
      T_ANDEQ: return (v & a) == b;
      T_OREQ:  return (v | a) == b;
      default: return 1'b0;
    endcase
  endfunction

  task automatic check(test_op_e o, logic [31:0] v, logic [31:0] a, logic [31:0] b, logic exp);
    op = o; value = v; arg0 = a; arg1 = b;
    #1;
    checks++;
    if (pass !== exp) begin
      failures++;
      $display("FAIL op=%0d value=%h a0=%h a1=%h pass=%b expected=%b", o, v, a, b, pass, exp);
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
    // -1 against 1: signed less, unsigned greater
    check(T_SLT, 32'hFFFF_FFFF, 32'd1, 0, 1'b1);
    check(T_ULT, 32'hFFFF_FFFF, 32'd1, 0, 1'b0);
    check(T_SGT, 32'hFFFF_FFFF, 32'd1, 0, 1'b0);
    check(T_UGT, 32'hFFFF_FFFF, 32'd1, 0, 1'b1);
    // equal values pass no strict comparison
    check(T_SLT, 32'd5, 32'd5, 0, 1'b0);
    check(T_ULT, 32'd5, 32'd5, 0, 1'b0);
    check(T_SGT, 32'd5, 32'd5, 0, 1'b0);
    check(T_UGT, 32'd5, 32'd5, 0, 1'b0);
    // bit 7 set? (value & 0x80) == 0x80
    check(T_ANDEQ, 32'h0000_0080, 32'h80, 32'h80, 1'b1);
    check(T_ANDEQ, 32'h0000_007F, 32'h80, 32'h80, 1'b0);
    check(T_OREQ,  32'h0000_000F, 32'hF0, 32'hFF, 1'b1);
    check(T_OREQ,  32'h0000_010F, 32'hF0, 32'hFF, 1'b0);
    for (int i = 0; i < 600; i++) begin
      test_op_e o;
      logic [31:0] v, a, b;
      o = test_op_e'($urandom_range(0, 5));
      v = $urandom; a = $urandom;
      b = (i % 2 == 0) ? (o == T_ANDEQ ? (v & a) : (v | a)) : $urandom;
      check(o, v, a, b, ref_test(o, v, a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
