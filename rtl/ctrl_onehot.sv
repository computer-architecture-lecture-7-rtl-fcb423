// One-flip-flop-per-state (one-hot) control unit.
//
// IF0 and IF1 are the fetch and decode flip-flops shared by all
// instructions. A one-cycle Start pulse (or the end of any instruction)
// sets IF0; IF0 passes to IF1; at the end of IF1 the instruction decoder
// line of the current instruction gates the token into the first
// flip-flop of that instruction's chain (R: 2, ORI: 2, LW: 3, SW: 2, BEQ: 1,
// J: 1). The last flip-flop of a chain hands the token back to IF0. sll has a
// variable-length chain: its second flip-flop holds the token while the
// shift counter is non-zero (the condition flag X = ZeroC) and releases it
// to IF0 when ZeroC is set. Fetch/decode and the per-instruction chains are
// independent, so an instruction is added by adding a chain.
//
// Control signals are ORs of the flip-flops in which they are asserted; in
// the sll chain they also depend on ZeroC. Decode also loads SCnt with sa.
// An undefined opcode returns the token to IF0. Synchronous active-high
// reset clears every flip-flop; the core raises Start in the first cycle
// after reset.
module ctrl_onehot
  import mips_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  ins_t  ins,
  input  logic  zero_c,
  output ctrl_t ctrl,
  output logic [14:0] state
);
  typedef struct packed {
    logic if0, if1;
    logic r0, r1;
    logic o0, o1;
    logic l0, l1, l2;
    logic s0, s1;
    logic b0;
    logic j0;
    logic sl0, sl1;
  } oh_t;

  oh_t q, d;
  logic done, none;

  assign state = q;
  assign none  = ~(ins.r | ins.ori | ins.lw | ins.sw | ins.beq | ins.j | ins.sll);
  assign done  = q.r1 | q.o1 | q.l2 | q.s1 | q.b0 | q.j0 | (q.sl1 & zero_c);

  always_comb begin
    d     = '0;
    d.if0 = start | done | (q.if1 & none);
    d.if1 = q.if0;
    d.r0  = q.if1 & ins.r;
    d.r1  = q.r0;
    d.o0  = q.if1 & ins.ori;
    d.o1  = q.o0;
    d.l0  = q.if1 & ins.lw;
    d.l1  = q.l0;
    d.l2  = q.l1;
    d.s0  = q.if1 & ins.sw;
    d.s1  = q.s0;
    d.b0  = q.if1 & ins.beq;
    d.j0  = q.if1 & ins.j;
    d.sl0 = q.if1 & ins.sll;
    d.sl1 = q.sl0 | (q.sl1 & ~zero_c);
  end

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end

  // Control matrix: OR of the control words of the active flip-flops
  always_comb begin
    ctrl = CTRL_IDLE;
    if (q.if0) ctrl |= cw_if();
    if (q.if1) begin
      ctrl |= cw_id();
      ctrl.SCWrite = 1'b1;
    end
    if (q.r0) ctrl |= cw_ex_r();
    if (q.r1) ctrl |= cw_wb_r();
    if (q.o0) ctrl |= cw_ex_ori();
    if (q.o1) ctrl |= cw_wb_ori();
    if (q.l0) ctrl |= cw_ex_mem();
    if (q.l1) ctrl |= cw_m_lw();
    if (q.l2) ctrl |= cw_wb_lw();
    if (q.s0) ctrl |= cw_ex_mem();
    if (q.s1) ctrl |= cw_m_sw();
    if (q.b0) ctrl |= cw_ex_beq();
    if (q.j0) ctrl |= cw_ex_j();
    // sll, first step: ALUOut <- A << 1 and SCnt-- (ZeroC = 0),
    // or ALUOut <- A + B with B = $zero (ZeroC = 1)
    if (q.sl0) begin
      ctrl.ALUSrcA = 2'd1;
      ctrl.ALUSrcB = 2'd0;
      ctrl.ALUOp   = zero_c ? ALUOP_ADD : ALUOP_FUN;
      ctrl.SCEn    = ~zero_c;
    end
    // sll, repeated step: ALUOut <- ALUOut << 1 and SCnt-- (ZeroC = 0),
    // or RF[rd] <- ALUOut (ZeroC = 1)
    if (q.sl1) begin
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
