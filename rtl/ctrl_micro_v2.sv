// Micro-programmed control unit V2.
//
// The 4-bit uPC addresses the microcode memory (ucode_rom_v2). The
// sequencing multiplexer has four inputs: 0 the external absolute address
// of the fetch microinstruction, 1 the dispatch map of the opcode, 2 uPC
// itself (repeat) and 3 uPC+1. Its select comes from the jump logic, which
// combines the microinstruction's next-address code with the datapath status
// signals Zero and Busy, so sequencing can be conditional. uPC is registered
// on the rising clock edge with synchronous active-high reset to 0.
module ctrl_micro_v2
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] opcode,
  input  logic [3:0] abs_addr,
  input  logic       zero,
  input  logic       busy,
  output ctrl_t      ctrl,
  output logic [3:0] upc
);
  uinstr_v2_t ui;
  logic [3:0] map_addr, upc_next;
  logic [1:0] sel;

  ucode_rom_v2 u_rom (
    .addr (upc),
    .data (ui)
  );

  ucode_dispatch u_map (
    .opcode     (opcode),
    .start_addr (map_addr)
  );

  jump_logic_v2 u_jl (
    .next (ui.next),
    .zero (zero),
    .busy (busy),
    .sel  (sel)
  );

  always_comb begin
    unique case (sel)
      2'd0:    upc_next = abs_addr;
      2'd1:    upc_next = map_addr;
      2'd2:    upc_next = upc;
      default: upc_next = upc + 4'd1;
    endcase
  end

  assign ctrl = expand_uctrl(ui.dp);

  always_ff @(posedge clk) begin
    if (rst) upc <= UA_IF;
    else     upc <= upc_next;
  end
endmodule
