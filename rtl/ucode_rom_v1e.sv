// Microcode memory of the short-word variant of micro-programmed control
// unit V1.
//
// In V1 the uBranch address field is used only to return to instruction
// fetch (address 0) at the end of every instruction. When the external
// source input of the sequencing multiplexer carries that fetch address, the
// field can be left out: each microinstruction is then 19 bits, the 17
// data-path control bits of the V1 word (same order and codes) followed by
// the 2-bit uBranch control (0 address, 1 external, 2 map, 3 uPC+1). The
// last step of every instruction uses code 1 instead of code 0. The
// document suggests this variant without giving its words; they follow from
// the V1 words. Don't-care entries are stored as 0; unused addresses 13..15
// return to fetch through the external source. Read is combinational (ROM).
module ucode_rom_v1e
  import mips_pkg::*;
(
  input  logic [3:0]  addr,
  output uinstr_v1e_t data
);
  always_comb begin
    unique case (addr)
      //                   IMMIRMRE S SB OP PS WP BC
      4'd0:  data = 19'b0_1_0_1_0_0_0_0_0_01_00_00_0_1_11; // IF
      4'd1:  data = 19'b0_0_0_0_0_0_0_1_0_11_00_00_0_0_10; // ID
      4'd2:  data = 19'b0_0_0_0_0_0_0_0_1_00_10_00_0_0_11; // Ex R-type
      4'd3:  data = 19'b0_0_0_0_1_0_1_0_0_00_00_00_0_0_01; // Wb R-type
      4'd4:  data = 19'b0_0_0_0_0_0_0_0_1_10_11_00_0_0_11; // Ex ORI
      4'd5:  data = 19'b0_0_0_0_0_0_1_0_0_00_00_00_0_0_01; // Wb ORI
      4'd6:  data = 19'b0_0_0_0_0_0_0_1_1_10_00_00_0_0_11; // Ex LW
      4'd7:  data = 19'b1_1_0_0_0_0_0_0_0_00_00_00_0_0_11; // M LW
      4'd8:  data = 19'b0_0_0_0_0_1_1_0_0_00_00_00_0_0_01; // Wb LW
      4'd9:  data = 19'b0_0_0_0_0_0_0_1_1_10_00_00_0_0_11; // Ex SW
      4'd10: data = 19'b1_0_1_0_0_0_0_0_0_00_00_00_0_0_01; // M SW
      4'd11: data = 19'b0_0_0_0_0_0_0_0_1_00_01_01_1_0_01; // Ex BEQ
      4'd12: data = 19'b0_0_0_0_0_0_0_0_0_00_00_10_0_1_01; // Ex J
      default: data = 19'b0_0_0_0_0_0_0_0_0_00_00_00_0_0_01;
    endcase
  end
endmodule
