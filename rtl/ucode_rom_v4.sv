// Microcode memory of the micro-programmed control unit V4.
//
// 16 words of 28 bits. Each word has:
// * the 17 data-path bits of the V1 word;
// * three more data-path bits for the variable-length sll: ALUSrcA bit 1
//   (ALUOut back into the ALU), SCWrite and SCEn;
// * V1's uBranch address (4) and uBranch control (2: 0 address,
//   1 external, 2 map, 3 uPC+1);
// * a condition code (2: always, ZeroC, not ZeroC, Zero). When the
//   condition is false, the sequencer takes uPC+1.
// Addresses 0..12 hold the V1 program; decode also loads sa into the shift
// counter. The sll program, reached through the dispatch map, is:
//   13  ALUOut <- A (A + B, rt = $zero), SCnt--; if ZeroC go to 15, else 14
//   14  ALUOut <- ALUOut << 1, SCnt--;           if not ZeroC stay at 14
//   15  RF[rd] <- ALUOut;                         go to fetch (0)
// Word 13 runs before the loop, so the loop tests the count of the shift
// still to come and sll rd, rs, sa takes 4 + sa cycles. The condition
// codes, the extra bits and the sll program are this design's; the
// document only names V4's multiplexer inputs and its conditional select.
// Don't-care entries are 0. Read is combinational (ROM).
module ucode_rom_v4
  import mips_pkg::*;
(
  input  logic [3:0] addr,
  output uinstr_v4_t data
);
  function automatic uinstr_v4_t w(ctrl_t c, logic [3:0] ba, logic [1:0] bc, ucond_v4_e cd);
    return '{dp: cw_u(c), src_aluout: c.ALUSrcA[1], sc_write: c.SCWrite, sc_en: c.SCEn,
             br_addr: ba, br_ctl: bc, cond: cd};
  endfunction

  function automatic ctrl_t sll_pass();
    ctrl_t c = CTRL_IDLE;
    c.ALUSrcA = 2'd1; c.ALUSrcB = 2'd0; c.ALUOp = ALUOP_ADD; c.SCEn = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t sll_shift();
    ctrl_t c = CTRL_IDLE;
    c.ALUSrcA = 2'd2; c.ALUOp = ALUOP_FUN; c.SCEn = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t id_sc();
    ctrl_t c = cw_id();
    c.SCWrite = 1'b1;
    return c;
  endfunction

  always_comb begin
    unique case (addr)
      4'd0:  data = w(cw_if(),     4'd0,       2'd3, UC_ALWAYS);
      4'd1:  data = w(id_sc(),     4'd0,       2'd2, UC_ALWAYS);
      4'd2:  data = w(cw_ex_r(),   4'd0,       2'd3, UC_ALWAYS);
      4'd3:  data = w(cw_wb_r(),   UA_IF,      2'd0, UC_ALWAYS);
      4'd4:  data = w(cw_ex_ori(), 4'd0,       2'd3, UC_ALWAYS);
      4'd5:  data = w(cw_wb_ori(), UA_IF,      2'd0, UC_ALWAYS);
      4'd6:  data = w(cw_ex_mem(), 4'd0,       2'd3, UC_ALWAYS);
      4'd7:  data = w(cw_m_lw(),   4'd0,       2'd3, UC_ALWAYS);
      4'd8:  data = w(cw_wb_lw(),  UA_IF,      2'd0, UC_ALWAYS);
      4'd9:  data = w(cw_ex_mem(), 4'd0,       2'd3, UC_ALWAYS);
      4'd10: data = w(cw_m_sw(),   UA_IF,      2'd0, UC_ALWAYS);
      4'd11: data = w(cw_ex_beq(), UA_IF,      2'd0, UC_ALWAYS);
      4'd12: data = w(cw_ex_j(),   UA_IF,      2'd0, UC_ALWAYS);
      4'd13: data = w(sll_pass(),  UA4_SLL_WB, 2'd0, UC_ZEROC);
      4'd14: data = w(sll_shift(), UA4_SLL_SH, 2'd0, UC_NZEROC);
      default: data = w(cw_wb_r(), UA_IF,      2'd0, UC_ALWAYS); // 15: sll write-back
    endcase
  end
endmodule
