// Hardwired FSM2 control unit: FSM1 with the LW and SW execution states
// merged into one Address Computation state (ALUOut <- A + S_Ext(imm)),
// after which the opcode selects LW Memory or SW Memory.
//
// Moore machine, 12 states, binary encoded; the control word depends only on
// the state. The state numbering, the return to fetch for an undefined
// opcode (FSM2 has no exception states) and the synchronous active-high
// reset to Instruction Fetch are this design's choices.
module ctrl_fsm2
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] opcode,
  output ctrl_t      ctrl,
  output logic [3:0] state
);
  typedef enum logic [3:0] {
    F2_IF     = 4'd0,
    F2_ID     = 4'd1,
    F2_EX_R   = 4'd2,
    F2_WB_R   = 4'd3,
    F2_EX_ORI = 4'd4,
    F2_WB_ORI = 4'd5,
    F2_ADDR   = 4'd6,
    F2_M_LW   = 4'd7,
    F2_WB_LW  = 4'd8,
    F2_M_SW   = 4'd9,
    F2_EX_BEQ = 4'd10,
    F2_EX_J   = 4'd11
  } fsm2_state_e;

  fsm2_state_e cur, nxt;
  assign state = cur;

  always_comb begin
    nxt = F2_IF;
    unique case (cur)
      F2_IF: nxt = F2_ID;
      F2_ID: begin
        unique case (opcode)
          OP_RTYPE:      nxt = F2_EX_R;
          OP_ORI:        nxt = F2_EX_ORI;
          OP_LW, OP_SW:  nxt = F2_ADDR;
          OP_BEQ:        nxt = F2_EX_BEQ;
          OP_J:          nxt = F2_EX_J;
          default:       nxt = F2_IF;
        endcase
      end
      F2_EX_R:   nxt = F2_WB_R;
      F2_EX_ORI: nxt = F2_WB_ORI;
      F2_ADDR:   nxt = (opcode == OP_LW) ? F2_M_LW : F2_M_SW;
      F2_M_LW:   nxt = F2_WB_LW;
      default:   nxt = F2_IF;
    endcase
  end

  always_comb begin
    unique case (cur)
      F2_IF:     ctrl = cw_if();
      F2_ID:     ctrl = cw_id();
      F2_EX_R:   ctrl = cw_ex_r();
      F2_WB_R:   ctrl = cw_wb_r();
      F2_EX_ORI: ctrl = cw_ex_ori();
      F2_WB_ORI: ctrl = cw_wb_ori();
      F2_ADDR:   ctrl = cw_ex_mem();
      F2_M_LW:   ctrl = cw_m_lw();
      F2_WB_LW:  ctrl = cw_wb_lw();
      F2_M_SW:   ctrl = cw_m_sw();
      F2_EX_BEQ: ctrl = cw_ex_beq();
      F2_EX_J:   ctrl = cw_ex_j();
      default:   ctrl = CTRL_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) cur <= F2_IF;
    else     cur <= nxt;
  end
endmodule
