// Dispatch map of the micro-programmed control units: the PLA that computes
// the start address of an instruction's microinstruction sequence from its
// opcode.
//
// R-type -> 2, ORI -> 4, LW -> 6, SW -> 9, BEQ -> 11, J -> 12, matching the
// microcode layout (which follows the order of the control-signal table).
// An undefined opcode maps to 0, the fetch microinstruction, a choice of
// this design. Combinational.
module ucode_dispatch
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output logic [3:0] start_addr
);
  always_comb begin
    unique case (opcode)
      OP_RTYPE: start_addr = UA_EX_R;
      OP_ORI:   start_addr = UA_EX_ORI;
      OP_LW:    start_addr = UA_EX_LW;
      OP_SW:    start_addr = UA_EX_SW;
      OP_BEQ:   start_addr = UA_EX_BR;
      OP_J:     start_addr = UA_EX_J;
      default:  start_addr = UA_IF;
    endcase
  end
endmodule
