// Condition evaluator of the read-and-test commands.
//
// Decides whether the word read from a register (value) passes the test of a
// read-and-test or multiple read-and-test command. The six conditions come
// from the concept: signed and unsigned "less than" and "greater than"
// against arg0, and "and with mask and compare" / "or with mask and compare",
// where arg0 is the mask and arg1 the required result. The comparisons are
// strict (the document names them "Less Than" and "Greater Than"); the codes
// are ctrl_pkg::test_op_e. An unknown code fails. Purely combinational.
module test_unit
  import ctrl_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  test_op_e     op,
  input  logic [W-1:0] value,
  input  logic [W-1:0] arg0,
  input  logic [W-1:0] arg1,
  output logic         pass
);

  always_comb begin
    unique case (op)
      T_SLT:   pass = $signed(value) < $signed(arg0);
      T_ULT:   pass = value < arg0;
      T_SGT:   pass = $signed(value) > $signed(arg0);
      T_UGT:   pass = value > arg0;
      T_ANDEQ: pass = (value & arg0) == arg1;
      T_OREQ:  pass = (value | arg0) == arg1;
      default: pass = 1'b0;
    endcase
  end

endmodule
