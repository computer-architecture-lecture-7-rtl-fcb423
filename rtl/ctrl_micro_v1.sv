// Micro-programmed control unit V1.
//
// A 4-bit microprogram counter uPC addresses the microcode memory
// (ucode_rom_v1); the data-path control fields of the addressed
// microinstruction drive the datapath. The uBranch control field selects the
// next uPC through a 4-input multiplexer: 0 the uBranch address field,
// 1 the external source, 2 the start address computed from the opcode by the
// dispatch PLA, 3 uPC+1. The selection does not depend on datapath status,
// so this unit runs the fixed-length instructions of FSM1 (no exception
// states, no variable-length sll). uPC is registered on the rising clock
// edge with synchronous active-high reset to 0 (instruction fetch).
//
// EXT_IF = 1 builds the short-word variant the document suggests: the
// microcode memory (ucode_rom_v1e) has no uBranch address field, and the
// last step of each instruction selects the external source, which must then
// carry the fetch address. The multiplexer is the same; its uBranch address
// input is tied to 0. EXT_IF = 0 (the default) is the 23-bit V1 word.
module ctrl_micro_v1
  import mips_pkg::*;
#(
  parameter bit EXT_IF = 1'b0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] opcode,
  input  logic [3:0] ext_addr,
  output ctrl_t      ctrl,
  output logic [3:0] upc
);
  uinstr_v1_t ui;
  logic [3:0] map_addr, upc_next;

  generate
    if (EXT_IF) begin : g_rom
      uinstr_v1e_t uie;
      ucode_rom_v1e u_rom (
        .addr (upc),
        .data (uie)
      );
      assign ui = '{dp: uie.dp, br_addr: 4'd0, br_ctl: uie.br_ctl};
    end else begin : g_rom
      ucode_rom_v1 u_rom (
        .addr (upc),
        .data (ui)
      );
    end
  endgenerate

  ucode_dispatch u_map (
    .opcode     (opcode),
    .start_addr (map_addr)
  );

  always_comb begin
    unique case (ui.br_ctl)
      2'd0:    upc_next = ui.br_addr;
      2'd1:    upc_next = ext_addr;
      2'd2:    upc_next = map_addr;
      default: upc_next = upc + 4'd1;
    endcase
  end

  assign ctrl = expand_uctrl(ui.dp);

  always_ff @(posedge clk) begin
    if (rst) upc <= UA_IF;
    else     upc <= upc_next;
  end
endmodule
