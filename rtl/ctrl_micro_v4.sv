// Micro-programmed control unit V4.
//
// V4 keeps V1's sequencing multiplexer: 0 uBranch address, 1 external
// source, 2 dispatch map, 3 uPC+1. Its select is conditional. Each
// microinstruction (ucode_rom_v4) carries a condition code. The flag
// evaluation logic tests it against the datapath status: always, ZeroC of
// the shift counter, not ZeroC, or the ALU Zero flag. A true condition uses
// the uBranch control field as the select; a false one takes uPC+1.
// This lets V4 run the variable-length sll, which V1 cannot. The dispatch
// map is V1's (ucode_dispatch), and the decoder's sll line overrides it with
// the sll program at address 13. The multiplexer inputs and the conditional
// select are the document's; the condition codes, the false-condition rule
// and the microcode are this design's. uPC is registered on the rising
// clock edge with synchronous active-high reset to 0 (instruction fetch).
module ctrl_micro_v4
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] opcode,
  input  ins_t       ins,
  input  logic       zero,
  input  logic       zero_c,
  input  logic [3:0] ext_addr,
  output ctrl_t      ctrl,
  output logic [3:0] upc
);
  uinstr_v4_t ui;
  logic [3:0] map_op, map_addr, upc_next;
  logic       cond_true;
  logic [1:0] sel;

  ucode_rom_v4 u_rom (
    .addr (upc),
    .data (ui)
  );

  ucode_dispatch u_map (
    .opcode     (opcode),
    .start_addr (map_op)
  );

  assign map_addr = ins.sll ? UA4_SLL : map_op;

  // condition flag evaluation
  always_comb begin
    unique case (ui.cond)
      UC_ALWAYS: cond_true = 1'b1;
      UC_ZEROC:  cond_true = zero_c;
      UC_NZEROC: cond_true = ~zero_c;
      default:   cond_true = zero;
    endcase
  end

  assign sel = cond_true ? ui.br_ctl : 2'd3;

  always_comb begin
    unique case (sel)
      2'd0:    upc_next = ui.br_addr;
      2'd1:    upc_next = ext_addr;
      2'd2:    upc_next = map_addr;
      default: upc_next = upc + 4'd1;
    endcase
  end

  always_comb begin
    ctrl = expand_uctrl(ui.dp);
    ctrl.ALUSrcA = {ui.src_aluout, ui.dp.ALUSrcA};
    ctrl.SCWrite = ui.sc_write;
    ctrl.SCEn    = ui.sc_en;
  end

  always_ff @(posedge clk) begin
    if (rst) upc <= UA_IF;
    else     upc <= upc_next;
  end
endmodule
