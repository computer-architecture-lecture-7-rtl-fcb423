// Microcode memory of the micro-programmed control unit V2.
//
// The same 13 microinstructions as V1 (same data-path fields and addresses),
// with the uBranch address and uBranch control fields replaced by a 3-bit
// next-address code: 20 bits per word. Fetch is followed by next, decode by
// dispatch, and the last microinstruction of every instruction by fetch.
// LW Memory uses spin, so a load waits there while the memory reports Busy;
// using spin there is this design's choice. Because ALUOut is rewritten on
// every clock, that microinstruction also keeps the ALU computing the
// address A + S_Ext(imm), so the address stays valid however long the memory
// is busy (MDR keeps sampling and holds the word of the last cycle). Read is
// combinational (ROM).
module ucode_rom_v2
  import mips_pkg::*;
(
  input  logic [3:0] addr,
  output uinstr_v2_t data
);
  always_comb begin
    unique case (addr)
      4'd0:  data = '{dp: cw_u(cw_if()),     next: UN_NEXT};
      4'd1:  data = '{dp: cw_u(cw_id()),     next: UN_DISPATCH};
      4'd2:  data = '{dp: cw_u(cw_ex_r()),   next: UN_NEXT};
      4'd3:  data = '{dp: cw_u(cw_wb_r()),   next: UN_FETCH};
      4'd4:  data = '{dp: cw_u(cw_ex_ori()), next: UN_NEXT};
      4'd5:  data = '{dp: cw_u(cw_wb_ori()), next: UN_FETCH};
      4'd6:  data = '{dp: cw_u(cw_ex_mem()), next: UN_NEXT};
      4'd7:  data = '{dp: cw_u(cw_m_lw() | cw_ex_mem()), next: UN_SPIN};
      4'd8:  data = '{dp: cw_u(cw_wb_lw()),  next: UN_FETCH};
      4'd9:  data = '{dp: cw_u(cw_ex_mem()), next: UN_NEXT};
      4'd10: data = '{dp: cw_u(cw_m_sw()),   next: UN_FETCH};
      4'd11: data = '{dp: cw_u(cw_ex_beq()), next: UN_FETCH};
      4'd12: data = '{dp: cw_u(cw_ex_j()),   next: UN_FETCH};
      default: data = '{dp: '0,              next: UN_FETCH};
    endcase
  end
endmodule
