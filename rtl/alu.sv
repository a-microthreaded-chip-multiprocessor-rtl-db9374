// alu: the arithmetic unit of the execute stage.
//
// Combinational. Performs the operations of the integer subset this
// processor implements: add, subtract, multiply (low 32 bits), and, or and
// set-on-less-than (signed). It also compares the two register operands for
// the conditional branches (eq). The operation set is this design's choice
// of MIPS operations needed by the loop kernels the architecture is shown on.
module alu
  import mt_pkg::*;
(
  input  aluop_t          op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y,
  output logic            eq
);
  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_MUL: y = a * b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_SLT: y = XLEN'($signed(a) < $signed(b));
      default: y = '0;
    endcase
  end
  assign eq = (a == b);
endmodule
