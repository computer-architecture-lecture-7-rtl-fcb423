// Multi-cycle MIPS-lite core: the shared datapath (mips_datapath) driven by
// one of nine control units, chosen by the CTRL parameter:
//   CU_FSM1      hardwired FSM1, binary state + PLA, with exception states
//   CU_FSM2      hardwired FSM2 (LW/SW address computation merged)
//   CU_ONEHOT    one flip-flop per state, with the variable-length sll
//   CU_SEQCNT    sequence/jump counter + decoder, with the variable-length sll
//   CU_MICRO_V1  micro-programmed, unconditional sequencing
//   CU_MICRO_V2  micro-programmed, conditional sequencing (spin on Busy)
//   CU_MICRO_V1E V1 with the short microinstruction (fetch address from the
//                external source)
//   CU_MICRO_V3  micro-programmed with two dispatch maps (FSM2 flow)
//   CU_MICRO_V4  micro-programmed, conditional select, variable-length sll
// All nine run ORI, LW, SW, BEQ, J and the R-type add, sub, and, or, slt.
// Only FSM1 takes the IllegalOp and Overflow exceptions; only the one-hot,
// sequence-counter and V4 units run sll as a shift by sa, one bit per cycle
// (the others execute it as a single 1-bit shift). `busy` stalls a load in
// the LW Memory step of the V2 unit and is ignored by the others.
//
// Timing: one clock per control step, synchronous active-high reset, PC
// starts at RESET_PC. `state` shows the control unit's state, step or uPC
// (zero-extended). The selection of control units per core is this design's
// packaging.
module mips_core
  import mips_pkg::*;
#(
  parameter cu_kind_e    CTRL      = CU_FSM1,
  parameter int unsigned MEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC  = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        busy,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output logic [31:0] epc,
  output logic [31:0] cause,
  output ctrl_t       ctrl,
  output logic [14:0] state
);
  logic [5:0] opcode, funct;
  logic       zero, overflow, zero_c;
  ins_t       ins;

  mips_datapath #(.MEM_WORDS(MEM_WORDS), .RESET_PC(RESET_PC)) u_dp (
    .clk      (clk),
    .rst      (rst),
    .ctrl     (ctrl),
    .opcode   (opcode),
    .funct    (funct),
    .zero     (zero),
    .overflow (overflow),
    .zero_c   (zero_c),
    .pc       (pc),
    .ir       (ir),
    .epc      (epc),
    .cause    (cause)
  );

  instr_decoder u_dec (
    .opcode (opcode),
    .funct  (funct),
    .ins    (ins)
  );

  generate
    case (CTRL)
      CU_FSM2: begin : g_cu
        logic [3:0] s;
        ctrl_fsm2 u_cu (.clk(clk), .rst(rst), .opcode(opcode), .ctrl(ctrl), .state(s));
        assign state = {11'h0, s};
      end
      CU_ONEHOT: begin : g_cu
        logic rst_q;
        logic start;
        always_ff @(posedge clk) rst_q <= rst;
        assign start = rst_q & ~rst;
        ctrl_onehot u_cu (.clk(clk), .rst(rst), .start(start), .ins(ins),
                          .zero_c(zero_c), .ctrl(ctrl), .state(state));
      end
      CU_SEQCNT: begin : g_cu
        logic [3:0] s;
        ctrl_seqcnt u_cu (.clk(clk), .rst(rst), .ins(ins), .zero_c(zero_c),
                          .ctrl(ctrl), .step(s));
        assign state = {11'h0, s};
      end
      CU_MICRO_V1: begin : g_cu
        logic [3:0] s;
        ctrl_micro_v1 u_cu (.clk(clk), .rst(rst), .opcode(opcode), .ext_addr(UA_IF),
                            .ctrl(ctrl), .upc(s));
        assign state = {11'h0, s};
      end
      CU_MICRO_V1E: begin : g_cu
        logic [3:0] s;
        ctrl_micro_v1 #(.EXT_IF(1'b1)) u_cu (.clk(clk), .rst(rst), .opcode(opcode),
                                             .ext_addr(UA_IF), .ctrl(ctrl), .upc(s));
        assign state = {11'h0, s};
      end
      CU_MICRO_V3: begin : g_cu
        logic [3:0] s;
        ctrl_micro_v3 u_cu (.clk(clk), .rst(rst), .opcode(opcode), .fetch_addr(UA_IF),
                            .ctrl(ctrl), .upc(s));
        assign state = {11'h0, s};
      end
      CU_MICRO_V4: begin : g_cu
        logic [3:0] s;
        ctrl_micro_v4 u_cu (.clk(clk), .rst(rst), .opcode(opcode), .ins(ins), .zero(zero),
                            .zero_c(zero_c), .ext_addr(UA_IF), .ctrl(ctrl), .upc(s));
        assign state = {11'h0, s};
      end
      CU_MICRO_V2: begin : g_cu
        logic [3:0] s;
        ctrl_micro_v2 u_cu (.clk(clk), .rst(rst), .opcode(opcode), .abs_addr(UA_IF),
                            .zero(zero), .busy(busy), .ctrl(ctrl), .upc(s));
        assign state = {11'h0, s};
      end
      default: begin : g_cu
        logic [3:0] s;
        ctrl_fsm1 #(.EXCEPTIONS(1'b1)) u_cu (.clk(clk), .rst(rst), .opcode(opcode),
                                            .overflow(overflow), .ctrl(ctrl), .state(s));
        assign state = {11'h0, s};
      end
    endcase
  endgenerate
endmodule
