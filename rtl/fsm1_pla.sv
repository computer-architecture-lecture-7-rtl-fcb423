// Control logic of the hardwired FSM1 control unit, written as a PLA.
//
// The AND plane decodes the 4-bit state S3..S0 into one product line per
// state (st[k] is high in state k) and forms the next-state product terms
// from the state lines, the opcode field Op5..Op0 and the ALU overflow flag.
// The OR plane sets every control signal as the OR of the state lines in
// which the control-signal table asserts it; PCWrite, for example, is
// st[0] | st[12] plus the two exception states. Next state is the OR of the
// codes selected by the next-state product terms. Purely combinational: the
// state register lives in ctrl_fsm1.
//
// States 0..12 are numbered top to bottom and left to right in the FSM1
// diagram (IF=0, ID=1, ..., Jump=12). With EXCEPTIONS=1, state 13 is
// IllegalOp (entered from decode for an unknown opcode) and state 14 is
// Overflow (entered from R-type execution when the ALU overflows); both
// write EPC <- PC-4 and Cause and load PC with 0x8000_0180. The numbers 13
// and 14 are this design's choice. Table don't-cares are driven as 0, and
// the decode cycle selects PC (not A) as ALU operand A so that ALUOut gets
// the branch target PC + (S_Ext(imm) << 2).
module fsm1_pla
  import mips_pkg::*;
#(
  parameter bit EXCEPTIONS = 1'b1
) (
  input  logic [3:0] state,
  input  logic [5:0] opcode,
  input  logic       overflow,
  output ctrl_t      ctrl,
  output logic [3:0] next_state
);
  logic [15:0] st;
  logic op_r, op_ori, op_lw, op_sw, op_beq, op_j, op_other;

  // AND plane
  always_comb begin
    for (int k = 0; k < 16; k++) st[k] = (state == 4'(k));
  end

  assign op_r     = (opcode == OP_RTYPE);
  assign op_ori   = (opcode == OP_ORI);
  assign op_lw    = (opcode == OP_LW);
  assign op_sw    = (opcode == OP_SW);
  assign op_beq   = (opcode == OP_BEQ);
  assign op_j     = (opcode == OP_J);
  assign op_other = ~(op_r | op_ori | op_lw | op_sw | op_beq | op_j);

  // OR plane: control signals
  always_comb begin
    ctrl            = CTRL_IDLE;
    ctrl.IorD       = st[7] | st[10];
    ctrl.MemRead    = st[0] | st[7];
    ctrl.MemWrite   = st[10];
    ctrl.IRWrite    = st[0];
    ctrl.RegDst     = st[3];
    ctrl.MemtoReg   = st[8];
    ctrl.RegWrite   = st[3] | st[5] | st[8];
    ctrl.ExtOp      = st[1] | st[6] | st[9];
    ctrl.ALUSrcA    = {1'b0, st[2] | st[4] | st[6] | st[9] | st[11]};
    ctrl.ALUSrcB[0] = st[0] | st[1] | st[13] | st[14];
    ctrl.ALUSrcB[1] = st[1] | st[4] | st[6] | st[9];
    ctrl.ALUOp      = aluop_e'({st[2] | st[4], st[4] | st[11] | st[13] | st[14]});
    ctrl.PCSrc[0]   = st[11] | st[13] | st[14];
    ctrl.PCSrc[1]   = st[12] | st[13] | st[14];
    ctrl.PCWrCd     = st[11];
    ctrl.PCWr       = st[0] | st[12] | st[13] | st[14];
    ctrl.EPCWrite   = st[13] | st[14];
    ctrl.CauseWrite = st[13] | st[14];
    ctrl.IntCause   = st[14];
  end

  // Next-state product terms and OR plane
  always_comb begin
    next_state = 4'd0;
    if (st[0])                             next_state |= 4'd1;
    if (st[1] & op_r)                      next_state |= 4'd2;
    if (st[1] & op_ori)                    next_state |= 4'd4;
    if (st[1] & op_lw)                     next_state |= 4'd6;
    if (st[1] & op_sw)                     next_state |= 4'd9;
    if (st[1] & op_beq)                    next_state |= 4'd11;
    if (st[1] & op_j)                      next_state |= 4'd12;
    if (EXCEPTIONS && (st[1] & op_other))  next_state |= 4'd13;
    if (st[2] & ~(EXCEPTIONS && overflow)) next_state |= 4'd3;
    if (EXCEPTIONS && (st[2] & overflow))  next_state |= 4'd14;
    if (st[4])                             next_state |= 4'd5;
    if (st[6])                             next_state |= 4'd7;
    if (st[7])                             next_state |= 4'd8;
    if (st[9])                             next_state |= 4'd10;
  end
endmodule
