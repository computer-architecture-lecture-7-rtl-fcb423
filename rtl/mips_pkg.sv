// Shared types and constants of the multi-cycle MIPS-lite processor.
//
// The control word `ctrl_t` carries every datapath control signal. Its first
// fourteen fields are the columns of the control-signal table of the
// multi-cycle design (IorD ... PCWr). The exception fields (EPCWrite,
// CauseWrite, IntCause) belong to the exception-capable datapath, and SCWrite /
// SCEn drive the shift counter SCnt used by the variable-length SLL. The
// 2-bit ALUSrcA code 2 selects ALUOut back into the ALU, also for SLL.
//
// Opcodes and funct codes are the standard MIPS32 ones. The encoding of the
// ALUOp field (add, sub, fun, or) in two bits is this design's choice.
package mips_pkg;

  // Instruction opcodes (IR[31:26])
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // R-type function codes (IR[5:0])
  localparam logic [5:0] FN_SLL = 6'h00;
  localparam logic [5:0] FN_ADD = 6'h20;
  localparam logic [5:0] FN_SUB = 6'h22;
  localparam logic [5:0] FN_AND = 6'h24;
  localparam logic [5:0] FN_OR  = 6'h25;
  localparam logic [5:0] FN_SLT = 6'h2A;

  // Exception vector (A_E) and cause codes
  localparam logic [31:0] EXC_VECTOR = 32'h8000_0180;
  localparam logic        CAUSE_ILLEGAL  = 1'b0;
  localparam logic        CAUSE_OVERFLOW = 1'b1;

  // ALUOp field of the control word
  typedef enum logic [1:0] {
    ALUOP_ADD = 2'd0,
    ALUOP_SUB = 2'd1,
    ALUOP_FUN = 2'd2,
    ALUOP_OR  = 2'd3
  } aluop_e;

  // Operation performed by the ALU (output of the ALU control)
  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,
    ALU_SUB  = 3'd1,
    ALU_AND  = 3'd2,
    ALU_OR   = 3'd3,
    ALU_SLT  = 3'd4,
    ALU_SHL1 = 3'd5
  } alu_op_e;

  // Control word: one field per control line of the datapath
  typedef struct packed {
    logic       IorD;
    logic       MemRead;
    logic       MemWrite;
    logic       IRWrite;
    logic       RegDst;
    logic       MemtoReg;
    logic       RegWrite;
    logic       ExtOp;       // 1: sign extend, 0: zero extend
    logic [1:0] ALUSrcA;     // 0: PC, 1: A, 2: ALUOut
    logic [1:0] ALUSrcB;     // 0: B, 1: 4, 2: Ext(imm), 3: Ext(imm)<<2
    aluop_e     ALUOp;
    logic [1:0] PCSrc;       // 0: ALU result, 1: ALUOut, 2: jump address, 3: A_E
    logic       PCWrCd;
    logic       PCWr;
    logic       EPCWrite;
    logic       CauseWrite;
    logic       IntCause;
    logic       SCWrite;
    logic       SCEn;
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '0;

  // Control words of the states of the control-signal table. Don't-care
  // entries of the table are driven as 0.
  function automatic ctrl_t cw_if();
    ctrl_t c = CTRL_IDLE;
    c.MemRead = 1'b1; c.IRWrite = 1'b1; c.ALUSrcB = 2'd1; c.ALUOp = ALUOP_ADD; c.PCWr = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t cw_id();
    ctrl_t c = CTRL_IDLE;
    c.ExtOp = 1'b1; c.ALUSrcA = 2'd0; c.ALUSrcB = 2'd3; c.ALUOp = ALUOP_ADD;
    return c;
  endfunction

  function automatic ctrl_t cw_ex_r();
    ctrl_t c = CTRL_IDLE;
    c.ALUSrcA = 2'd1; c.ALUSrcB = 2'd0; c.ALUOp = ALUOP_FUN;
    return c;
  endfunction

  function automatic ctrl_t cw_wb_r();
    ctrl_t c = CTRL_IDLE;
    c.RegDst = 1'b1; c.MemtoReg = 1'b0; c.RegWrite = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t cw_ex_ori();
    ctrl_t c = CTRL_IDLE;
    c.ExtOp = 1'b0; c.ALUSrcA = 2'd1; c.ALUSrcB = 2'd2; c.ALUOp = ALUOP_OR;
    return c;
  endfunction

  function automatic ctrl_t cw_wb_ori();
    ctrl_t c = CTRL_IDLE;
    c.RegDst = 1'b0; c.MemtoReg = 1'b0; c.RegWrite = 1'b1;
    return c;
  endfunction

  // Address computation, shared by LW and SW
  function automatic ctrl_t cw_ex_mem();
    ctrl_t c = CTRL_IDLE;
    c.ExtOp = 1'b1; c.ALUSrcA = 2'd1; c.ALUSrcB = 2'd2; c.ALUOp = ALUOP_ADD;
    return c;
  endfunction

  function automatic ctrl_t cw_m_lw();
    ctrl_t c = CTRL_IDLE;
    c.IorD = 1'b1; c.MemRead = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t cw_wb_lw();
    ctrl_t c = CTRL_IDLE;
    c.RegDst = 1'b0; c.MemtoReg = 1'b1; c.RegWrite = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t cw_m_sw();
    ctrl_t c = CTRL_IDLE;
    c.IorD = 1'b1; c.MemWrite = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t cw_ex_beq();
    ctrl_t c = CTRL_IDLE;
    c.ALUSrcA = 2'd1; c.ALUSrcB = 2'd0; c.ALUOp = ALUOP_SUB; c.PCSrc = 2'd1; c.PCWrCd = 1'b1;
    return c;
  endfunction

  function automatic ctrl_t cw_ex_j();
    ctrl_t c = CTRL_IDLE;
    c.PCSrc = 2'd2; c.PCWr = 1'b1;
    return c;
  endfunction

  // Exception states: EPC <- PC - 4 through the ALU, Cause <- code,
  // PC <- A_E
  function automatic ctrl_t cw_exc(input logic cause);
    ctrl_t c = CTRL_IDLE;
    c.ALUSrcA = 2'd0; c.ALUSrcB = 2'd1; c.ALUOp = ALUOP_SUB;
    c.EPCWrite = 1'b1; c.CauseWrite = 1'b1; c.IntCause = cause;
    c.PCSrc = 2'd3; c.PCWr = 1'b1;
    return c;
  endfunction

  // The fourteen table columns as stored in a horizontal microinstruction
  // (17 bits: ALUSrcA 1 bit; ALUSrcB, ALUOp and PCSrc 2 bits each).
  typedef struct packed {
    logic       IorD;
    logic       MemRead;
    logic       MemWrite;
    logic       IRWrite;
    logic       RegDst;
    logic       MemtoReg;
    logic       RegWrite;
    logic       ExtOp;
    logic       ALUSrcA;
    logic [1:0] ALUSrcB;
    aluop_e     ALUOp;
    logic [1:0] PCSrc;
    logic       PCWrCd;
    logic       PCWr;
  } uctrl_t;

  function automatic ctrl_t expand_uctrl(input uctrl_t u);
    ctrl_t c = CTRL_IDLE;
    c.IorD = u.IorD; c.MemRead = u.MemRead; c.MemWrite = u.MemWrite;
    c.IRWrite = u.IRWrite; c.RegDst = u.RegDst; c.MemtoReg = u.MemtoReg;
    c.RegWrite = u.RegWrite; c.ExtOp = u.ExtOp; c.ALUSrcA = {1'b0, u.ALUSrcA};
    c.ALUSrcB = u.ALUSrcB; c.ALUOp = u.ALUOp; c.PCSrc = u.PCSrc;
    c.PCWrCd = u.PCWrCd; c.PCWr = u.PCWr;
    return c;
  endfunction

  // Compress a control word into the 17 table columns of a microinstruction
  function automatic uctrl_t cw_u(input ctrl_t c);
    uctrl_t u;
    u.IorD = c.IorD; u.MemRead = c.MemRead; u.MemWrite = c.MemWrite;
    u.IRWrite = c.IRWrite; u.RegDst = c.RegDst; u.MemtoReg = c.MemtoReg;
    u.RegWrite = c.RegWrite; u.ExtOp = c.ExtOp; u.ALUSrcA = c.ALUSrcA[0];
    u.ALUSrcB = c.ALUSrcB; u.ALUOp = c.ALUOp; u.PCSrc = c.PCSrc;
    u.PCWrCd = c.PCWrCd; u.PCWr = c.PCWr;
    return u;
  endfunction

  // Micro-programmed control unit V1: 23-bit microinstruction
  typedef struct packed {
    uctrl_t     dp;         // data-path control signals
    logic [3:0] br_addr;    // uBranch address
    logic [1:0] br_ctl;     // uBranch control: 0 addr, 1 external, 2 map, 3 uPC+1
  } uinstr_v1_t;

  // Variant of V1 without the uBranch address field (19 bits): the last
  // microinstruction of each instruction selects the external source, which
  // carries the instruction-fetch address
  typedef struct packed {
    uctrl_t     dp;
    logic [1:0] br_ctl;
  } uinstr_v1e_t;

  // Micro-programmed control unit V2: next-address control codes
  typedef enum logic [2:0] {
    UN_NEXT     = 3'd0,     // uPC+1
    UN_SPIN     = 3'd1,     // busy ? uPC : uPC+1
    UN_FETCH    = 3'd2,     // absolute (instruction fetch) address
    UN_DISPATCH = 3'd3,     // MAP(opcode)
    UN_FEQZ     = 3'd4,     // zero ? absolute : uPC+1
    UN_FNEZ     = 3'd5      // zero ? uPC+1 : absolute
  } unext_e;

  typedef struct packed {
    uctrl_t dp;
    unext_e next;
  } uinstr_v2_t;

  // Micro-programmed control unit V3: 2-bit sequencing code selecting one
  // of the multiplexer inputs uPC+1, MAP1(opcode), MAP2(opcode) and the
  // instruction-fetch address
  typedef enum logic [1:0] {
    US_NEXT  = 2'd0,
    US_MAP1  = 2'd1,
    US_MAP2  = 2'd2,
    US_FETCH = 2'd3
  } useq_v3_e;

  typedef struct packed {
    uctrl_t   dp;
    useq_v3_e seq;
  } uinstr_v3_t;

  // Microcode addresses of V3 (FSM2 layout: shared address computation)
  localparam logic [3:0] UA3_EX_R   = 4'd2;
  localparam logic [3:0] UA3_EX_ORI = 4'd4;
  localparam logic [3:0] UA3_ADDR   = 4'd6;
  localparam logic [3:0] UA3_M_LW   = 4'd7;
  localparam logic [3:0] UA3_M_SW   = 4'd9;
  localparam logic [3:0] UA3_EX_BR  = 4'd10;
  localparam logic [3:0] UA3_EX_J   = 4'd11;

  // Micro-programmed control unit V4: V1's sequencing fields plus a
  // condition code; when the condition is false the next address is uPC+1
  typedef enum logic [1:0] {
    UC_ALWAYS = 2'd0,
    UC_ZEROC  = 2'd1,       // shift counter is zero
    UC_NZEROC = 2'd2,       // shift counter is not zero
    UC_ZERO   = 2'd3        // ALU result is zero
  } ucond_v4_e;

  typedef struct packed {
    uctrl_t     dp;
    logic       src_aluout; // ALUSrcA bit 1: ALUOut back into the ALU
    logic       sc_write;   // SCWrite
    logic       sc_en;      // SCEn
    logic [3:0] br_addr;
    logic [1:0] br_ctl;
    ucond_v4_e  cond;
  } uinstr_v4_t;

  localparam logic [3:0] UA4_SLL    = 4'd13;
  localparam logic [3:0] UA4_SLL_SH = 4'd14;
  localparam logic [3:0] UA4_SLL_WB = 4'd15;

  // Microcode addresses of the first microinstruction of each instruction
  localparam logic [3:0] UA_IF    = 4'd0;
  localparam logic [3:0] UA_EX_R  = 4'd2;
  localparam logic [3:0] UA_EX_ORI= 4'd4;
  localparam logic [3:0] UA_EX_LW = 4'd6;
  localparam logic [3:0] UA_EX_SW = 4'd9;
  localparam logic [3:0] UA_EX_BR = 4'd11;
  localparam logic [3:0] UA_EX_J  = 4'd12;

  // Instruction lines of the instruction decoder
  typedef struct packed {
    logic r;      // R-type other than sll
    logic ori;
    logic lw;
    logic sw;
    logic beq;
    logic j;
    logic sll;    // variable-length shift
  } ins_t;

  // Control-unit styles a core can be built with
  typedef enum logic [3:0] {
    CU_FSM1      = 4'd0,
    CU_FSM2      = 4'd1,
    CU_ONEHOT    = 4'd2,
    CU_SEQCNT    = 4'd3,
    CU_MICRO_V1  = 4'd4,
    CU_MICRO_V2  = 4'd5,
    CU_MICRO_V1E = 4'd6,
    CU_MICRO_V3  = 4'd7,
    CU_MICRO_V4  = 4'd8
  } cu_kind_e;

endpackage
