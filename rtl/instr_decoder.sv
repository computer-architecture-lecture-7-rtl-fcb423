// Instruction decoder of the one-hot and sequence-counter control units.
//
// Turns the opcode and funct fields of IR into one line per instruction
// (Ins lines): R-type, ORI, LW, SW, BEQ, J, and a separate line for sll,
// which needs a variable number of cycles and is sequenced on its own. An
// undefined opcode raises no line. Combinational.
module instr_decoder
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  output ins_t       ins
);
  always_comb begin
    ins     = '0;
    ins.r   = (opcode == OP_RTYPE) && (funct != FN_SLL);
    ins.sll = (opcode == OP_RTYPE) && (funct == FN_SLL);
    ins.ori = (opcode == OP_ORI);
    ins.lw  = (opcode == OP_LW);
    ins.sw  = (opcode == OP_SW);
    ins.beq = (opcode == OP_BEQ);
    ins.j   = (opcode == OP_J);
  end
endmodule
