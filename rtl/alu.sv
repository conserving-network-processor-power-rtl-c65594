// alu: the 32-bit execution unit of a processing element.
//
// Combinational ALU with the operations named for the PE's execution unit:
// AND, OR, NOT (of operand a), XOR, add and subtract. The result is available in
// the same cycle, matching the one-cycle ALU latency given for the design.
// Interface: op selects the operation, a and b are the operands, y the result.
// The operation set and the one-cycle latency follow the design description;
// the opcode encoding (np_pkg::alu_op_e) is this design's own. Undefined
// opcodes return zero.
module alu
  import np_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  alu_op_e        op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   y
);

  always_comb begin
    unique case (op)
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_NOT: y = ~a;
      ALU_XOR: y = a ^ b;
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      default: y = '0;
    endcase
  end

endmodule
