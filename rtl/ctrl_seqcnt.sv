// Sequence/jump counter control unit.
//
// A 4-bit counter (seq_counter) feeds a 4:16 decoder whose outputs T0..T15
// are the time steps of an instruction. T0 (fetch) and T1 (decode) are
// common; from T2 on, each control signal is the OR of the AND terms
// (instruction line & time step) of the control matrix. Sequencing: Up is
// implicit (asserted when neither Reset nor Load is); the last step of each
// instruction asserts ldT0, which resets the counter to T0. The sll
// instruction repeats T3 while the shift counter is non-zero: ldT3 loads the
// counter with the micro-jump address 0011, whose bits are ORs of the active
// micro-jump lines. When ZeroC is set in T3, sll writes RF[rd] and asserts
// ldT0.
//
// Step assignment: R and ORI use T2-T3, LW T2-T4, SW T2-T3, BEQ and J T2,
// sll T2 and T3 (repeated). Decode (T1) also loads SCnt with sa. With no
// instruction line active in T2 (undefined opcode) the counter is reset,
// a choice of this design. Synchronous active-high reset also resets the
// counter to T0.
module ctrl_seqcnt
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  ins_t       ins,
  input  logic       zero_c,
  output ctrl_t      ctrl,
  output logic [3:0] step
);
  logic [15:0] t;
  logic        ld_t0, ld_t3, cnt_reset, cnt_load, cnt_up, none;
  logic [3:0]  jump_addr;

  seq_counter #(.W(4)) u_cnt (
    .clk   (clk),
    .reset (cnt_reset),
    .load  (cnt_load),
    .up    (cnt_up),
    .d     (jump_addr),
    .q     (step)
  );

  // 4:16 decoder
  always_comb begin
    t = '0;
    t[step] = 1'b1;
  end

  assign none = ~(ins.r | ins.ori | ins.lw | ins.sw | ins.beq | ins.j | ins.sll);

  // Micro-jump lines
  assign ld_t0 = (t[3] & ins.r) | (t[3] & ins.ori) | (t[4] & ins.lw) |
                 (t[3] & ins.sw) | (t[2] & ins.beq) | (t[2] & ins.j)  |
                 (t[3] & ins.sll & zero_c) | (t[2] & none);
  assign ld_t3 = t[3] & ins.sll & ~zero_c;

  assign jump_addr = {2'b00, ld_t3, ld_t3};
  assign cnt_reset = rst | ld_t0;
  assign cnt_load  = ld_t3;
  assign cnt_up    = ~cnt_reset & ~cnt_load;

  // Control matrix
  always_comb begin
    ctrl = CTRL_IDLE;
    if (t[0]) ctrl |= cw_if();
    if (t[1]) begin
      ctrl |= cw_id();
      ctrl.SCWrite = 1'b1;
    end
    if (t[2] & ins.r)   ctrl |= cw_ex_r();
    if (t[3] & ins.r)   ctrl |= cw_wb_r();
    if (t[2] & ins.ori) ctrl |= cw_ex_ori();
    if (t[3] & ins.ori) ctrl |= cw_wb_ori();
    if (t[2] & ins.lw)  ctrl |= cw_ex_mem();
    if (t[3] & ins.lw)  ctrl |= cw_m_lw();
    if (t[4] & ins.lw)  ctrl |= cw_wb_lw();
    if (t[2] & ins.sw)  ctrl |= cw_ex_mem();
    if (t[3] & ins.sw)  ctrl |= cw_m_sw();
    if (t[2] & ins.beq) ctrl |= cw_ex_beq();
    if (t[2] & ins.j)   ctrl |= cw_ex_j();
    if (t[2] & ins.sll) begin
      ctrl.ALUSrcA = 2'd1;
      ctrl.ALUSrcB = 2'd0;
      ctrl.ALUOp   = zero_c ? ALUOP_ADD : ALUOP_FUN;
      ctrl.SCEn    = ~zero_c;
    end
    if (t[3] & ins.sll) begin
      if (!zero_c) begin
        ctrl.ALUSrcA = 2'd2;
        ctrl.ALUOp   = ALUOP_FUN;
        ctrl.SCEn    = 1'b1;
      end else begin
        ctrl.RegDst   = 1'b1;
        ctrl.RegWrite = 1'b1;
      end
    end
  end
endmodule
