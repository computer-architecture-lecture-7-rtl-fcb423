// Microcode memory of the micro-programmed control unit V3.
//
// 12 microinstructions laid out like the states of FSM2, whose LW and SW
// share one address-computation step (address 6). Each word holds the 17
// data-path control bits of the V1 word (same order and codes) and a 2-bit
// sequencing code: 19 bits per word. Fetch continues to uPC+1. Decode
// dispatches through MAP1 and the shared address step through MAP2, and the
// last step of every instruction returns to fetch. The document describes
// V3 as vertical microprogramming but gives no encoding for the data-path
// fields, so they are stored one bit per signal, as in V1. Don't-care
// entries are 0. Unused addresses 12..15 return to fetch. Read is
// combinational (ROM).
module ucode_rom_v3
  import mips_pkg::*;
(
  input  logic [3:0] addr,
  output uinstr_v3_t data
);
  always_comb begin
    unique case (addr)
      4'd0:  data = '{dp: cw_u(cw_if()),     seq: US_NEXT};
      4'd1:  data = '{dp: cw_u(cw_id()),     seq: US_MAP1};
      4'd2:  data = '{dp: cw_u(cw_ex_r()),   seq: US_NEXT};
      4'd3:  data = '{dp: cw_u(cw_wb_r()),   seq: US_FETCH};
      4'd4:  data = '{dp: cw_u(cw_ex_ori()), seq: US_NEXT};
      4'd5:  data = '{dp: cw_u(cw_wb_ori()), seq: US_FETCH};
      4'd6:  data = '{dp: cw_u(cw_ex_mem()), seq: US_MAP2};
      4'd7:  data = '{dp: cw_u(cw_m_lw()),   seq: US_NEXT};
      4'd8:  data = '{dp: cw_u(cw_wb_lw()),  seq: US_FETCH};
      4'd9:  data = '{dp: cw_u(cw_m_sw()),   seq: US_FETCH};
      4'd10: data = '{dp: cw_u(cw_ex_beq()), seq: US_FETCH};
      4'd11: data = '{dp: cw_u(cw_ex_j()),   seq: US_FETCH};
      default: data = '{dp: '0,              seq: US_FETCH};
    endcase
  end
endmodule
