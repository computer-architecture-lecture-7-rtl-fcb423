// Hardwired FSM1 control unit: a Moore machine with a 4-bit binary state
// register and PLA control logic (fsm1_pla).
//
// Each row of the control-signal table is one state; instructions take 3 to
// 5 cycles (IF, ID, execute, memory, write-back). The control word depends
// only on the current state. From decode the opcode selects the execute
// state; with EXCEPTIONS=1 an undefined opcode goes to IllegalOp and an
// R-type ALU overflow goes to Overflow. Synchronous active-high reset puts
// the machine in Instruction Fetch (state 0).
module ctrl_fsm1
  import mips_pkg::*;
#(
  parameter bit EXCEPTIONS = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] opcode,
  input  logic       overflow,
  output ctrl_t      ctrl,
  output logic [3:0] state
);
  logic [3:0] next_state;

  fsm1_pla #(.EXCEPTIONS(EXCEPTIONS)) u_pla (
    .state      (state),
    .opcode     (opcode),
    .overflow   (overflow),
    .ctrl       (ctrl),
    .next_state (next_state)
  );

  always_ff @(posedge clk) begin
    if (rst) state <= 4'd0;
    else     state <= next_state;
  end
endmodule
