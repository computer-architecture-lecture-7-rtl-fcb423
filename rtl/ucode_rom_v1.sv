// Microcode memory of the micro-programmed control unit V1.
//
// 13 horizontal microinstructions of 23 bits, one per row of the
// control-signal table, at the addresses of that table's order. Bit fields,
// MSB first: IorD, MemRead, MemWrite, IRWrite, RegDst, MemtoReg, RegWrite,
// ExtOp, ALUSrcA (1 bit), ALUSrcB (2), ALUOp (2: add 00, sub 01, fun 10,
// or 11), PCSrc (2), PCWrCd, PCWr, uBranch address (4), uBranch control (2:
// 0 address, 1 external, 2 map, 3 uPC+1). The field widths and the sequence
// codes are the document's; don't-care entries are stored as 0 and the
// decode word selects PC as ALU operand A. Unused addresses 13..15 hold a
// jump to address 0. Read is combinational (ROM).
module ucode_rom_v1
  import mips_pkg::*;
(
  input  logic [3:0] addr,
  output uinstr_v1_t data
);
  always_comb begin
    unique case (addr)
      //                   IMMIRMRE S SB OP PS WP  BA   BC
      4'd0:  data = 23'b0_1_0_1_0_0_0_0_0_01_00_00_0_1_0000_11; // IF
      4'd1:  data = 23'b0_0_0_0_0_0_0_1_0_11_00_00_0_0_0000_10; // ID
      4'd2:  data = 23'b0_0_0_0_0_0_0_0_1_00_10_00_0_0_0000_11; // Ex R-type
      4'd3:  data = 23'b0_0_0_0_1_0_1_0_0_00_00_00_0_0_0000_00; // Wb R-type
      4'd4:  data = 23'b0_0_0_0_0_0_0_0_1_10_11_00_0_0_0000_11; // Ex ORI
      4'd5:  data = 23'b0_0_0_0_0_0_1_0_0_00_00_00_0_0_0000_00; // Wb ORI
      4'd6:  data = 23'b0_0_0_0_0_0_0_1_1_10_00_00_0_0_0000_11; // Ex LW
      4'd7:  data = 23'b1_1_0_0_0_0_0_0_0_00_00_00_0_0_0000_11; // M LW
      4'd8:  data = 23'b0_0_0_0_0_1_1_0_0_00_00_00_0_0_0000_00; // Wb LW
      4'd9:  data = 23'b0_0_0_0_0_0_0_1_1_10_00_00_0_0_0000_11; // Ex SW
      4'd10: data = 23'b1_0_1_0_0_0_0_0_0_00_00_00_0_0_0000_00; // M SW
      4'd11: data = 23'b0_0_0_0_0_0_0_0_1_00_01_01_1_0_0000_00; // Ex BEQ
      4'd12: data = 23'b0_0_0_0_0_0_0_0_0_00_00_10_0_1_0000_00; // Ex J
      default: data = 23'b0_0_0_0_0_0_0_0_0_00_00_00_0_0_0000_00;
    endcase
  end
endmodule
