// Top level: nine multi-cycle MIPS-lite cores side by side, one per control
// unit style (FSM1 with exceptions, FSM2, one-hot, sequence/jump counter,
// micro-programmed V1 and V2, V1 with the short microinstruction, V3 with
// two dispatch maps, and V4 with conditional sequencing). All
// share the same datapath design, clock and reset; each has its own unified
// memory of MEM_WORDS words, so the same program can be loaded into each and
// the nine control units compared cycle by cycle.
//
// Ports: clk, synchronous active-high rst, mem_busy (memory-busy status to
// the V2 unit, which spins in LW Memory while it is high), and per core
// (index = cu_kind_e value) the PC, IR, EPC, Cause, control word and control
// state. Putting all nine side by side is this design's packaging.
module mips_multicycle_top
  import mips_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        mem_busy,
  output logic [31:0] pc    [9],
  output logic [31:0] ir    [9],
  output logic [31:0] epc   [9],
  output logic [31:0] cause [9],
  output ctrl_t       ctrl  [9],
  output logic [14:0] state [9]
);
  mips_core #(.CTRL(CU_FSM1), .MEM_WORDS(MEM_WORDS)) u_fsm1 (
    .clk(clk), .rst(rst), .busy(1'b0), .pc(pc[0]), .ir(ir[0]), .epc(epc[0]),
    .cause(cause[0]), .ctrl(ctrl[0]), .state(state[0]));

  mips_core #(.CTRL(CU_FSM2), .MEM_WORDS(MEM_WORDS)) u_fsm2 (
    .clk(clk), .rst(rst), .busy(1'b0), .pc(pc[1]), .ir(ir[1]), .epc(epc[1]),
    .cause(cause[1]), .ctrl(ctrl[1]), .state(state[1]));

  mips_core #(.CTRL(CU_ONEHOT), .MEM_WORDS(MEM_WORDS)) u_onehot (
    .clk(clk), .rst(rst), .busy(1'b0), .pc(pc[2]), .ir(ir[2]), .epc(epc[2]),
    .cause(cause[2]), .ctrl(ctrl[2]), .state(state[2]));

  mips_core #(.CTRL(CU_SEQCNT), .MEM_WORDS(MEM_WORDS)) u_seqcnt (
    .clk(clk), .rst(rst), .busy(1'b0), .pc(pc[3]), .ir(ir[3]), .epc(epc[3]),
    .cause(cause[3]), .ctrl(ctrl[3]), .state(state[3]));

  mips_core #(.CTRL(CU_MICRO_V1), .MEM_WORDS(MEM_WORDS)) u_micro_v1 (
    .clk(clk), .rst(rst), .busy(1'b0), .pc(pc[4]), .ir(ir[4]), .epc(epc[4]),
    .cause(cause[4]), .ctrl(ctrl[4]), .state(state[4]));

  mips_core #(.CTRL(CU_MICRO_V2), .MEM_WORDS(MEM_WORDS)) u_micro_v2 (
    .clk(clk), .rst(rst), .busy(mem_busy), .pc(pc[5]), .ir(ir[5]), .epc(epc[5]),
    .cause(cause[5]), .ctrl(ctrl[5]), .state(state[5]));

  mips_core #(.CTRL(CU_MICRO_V1E), .MEM_WORDS(MEM_WORDS)) u_micro_v1e (
    .clk(clk), .rst(rst), .busy(1'b0), .pc(pc[6]), .ir(ir[6]), .epc(epc[6]),
    .cause(cause[6]), .ctrl(ctrl[6]), .state(state[6]));

  mips_core #(.CTRL(CU_MICRO_V3), .MEM_WORDS(MEM_WORDS)) u_micro_v3 (
    .clk(clk), .rst(rst), .busy(1'b0), .pc(pc[7]), .ir(ir[7]), .epc(epc[7]),
    .cause(cause[7]), .ctrl(ctrl[7]), .state(state[7]));

  mips_core #(.CTRL(CU_MICRO_V4), .MEM_WORDS(MEM_WORDS)) u_micro_v4 (
    .clk(clk), .rst(rst), .busy(1'b0), .pc(pc[8]), .ir(ir[8]), .epc(epc[8]),
    .cause(cause[8]), .ctrl(ctrl[8]), .state(state[8]));
endmodule
