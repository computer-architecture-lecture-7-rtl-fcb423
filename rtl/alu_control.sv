// ALU control: turns the 2-bit ALUOp of the control word and the funct field
// of an R-type instruction into the ALU operation.
//
// ALUOp add, sub and or select that operation directly; ALUOp fun decodes
// funct (add, sub, and, or, slt, and sll as a 1-bit left shift). An unknown
// funct falls back to add. Combinational. The funct set is this design's
// choice; the four ALUOp values are those of the control-signal table.
module alu_control
  import mips_pkg::*;
(
  input  aluop_e     aluop,
  input  logic [5:0] funct,
  output alu_op_e    op
);
  always_comb begin
    unique case (aluop)
      ALUOP_ADD: op = ALU_ADD;
      ALUOP_SUB: op = ALU_SUB;
      ALUOP_OR:  op = ALU_OR;
      default: begin
        unique case (funct)
          FN_ADD:  op = ALU_ADD;
          FN_SUB:  op = ALU_SUB;
          FN_AND:  op = ALU_AND;
          FN_OR:   op = ALU_OR;
          FN_SLT:  op = ALU_SLT;
          FN_SLL:  op = ALU_SHL1;
          default: op = ALU_ADD;
        endcase
      end
    endcase
  end
endmodule
