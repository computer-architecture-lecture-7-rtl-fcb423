// Dispatch maps of the micro-programmed control unit V3.
//
// V3 has two opcode maps at its sequencing multiplexer. MAP1 is used after
// decode and gives the first microinstruction of each instruction; LW and
// SW share the address-computation microinstruction there, as in the
// optimized state machine FSM2. MAP2 is used after that shared step and
// picks the memory-access microinstruction of LW or SW.
//   MAP1: R-type -> 2, ORI -> 4, LW/SW -> 6, BEQ -> 10, J -> 11
//   MAP2: LW -> 7, SW -> 9
// The document names the two maps but not their contents; these follow the
// FSM2 flow. Any other opcode maps to 0, the fetch microinstruction (this
// design's choice). Combinational.
module ucode_dispatch_v3
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output logic [3:0] map1,
  output logic [3:0] map2
);
  always_comb begin
    unique case (opcode)
      OP_RTYPE:     map1 = UA3_EX_R;
      OP_ORI:       map1 = UA3_EX_ORI;
      OP_LW, OP_SW: map1 = UA3_ADDR;
      OP_BEQ:       map1 = UA3_EX_BR;
      OP_J:         map1 = UA3_EX_J;
      default:      map1 = UA_IF;
    endcase
    unique case (opcode)
      OP_LW:   map2 = UA3_M_LW;
      OP_SW:   map2 = UA3_M_SW;
      default: map2 = UA_IF;
    endcase
  end
endmodule
