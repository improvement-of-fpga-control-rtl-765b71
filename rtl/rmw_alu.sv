// Read-modify-write operation unit.
//
// Computes the value written back by a read-modify-write command from the
// word read from the register (orig) and the command's operand (arg). The
// set of operations (Increment, Decrement, Add, Subtract, And, Or, Xor)
// follows the concept; the codes are those of ctrl_pkg::alu_op_e, and the
// arithmetic wraps modulo 2**W, which is this design's choice. Increment and
// Decrement ignore arg. Purely combinational; an unknown code returns orig
// unchanged.
module rmw_alu
  import ctrl_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  alu_op_e        op,
  input  logic [W-1:0]   orig,
  input  logic [W-1:0]   arg,
  output logic [W-1:0]   result
);

  always_comb begin
    unique case (op)
      ALU_INC: result = orig + W'(1);
      ALU_DEC: result = orig - W'(1);
      ALU_ADD: result = orig + arg;
      ALU_SUB: result = orig - arg;
      ALU_AND: result = orig & arg;
      ALU_OR:  result = orig | arg;
      ALU_XOR: result = orig ^ arg;
      default: result = orig;
    endcase
  end

endmodule
