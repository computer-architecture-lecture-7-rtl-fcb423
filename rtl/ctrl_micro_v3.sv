// Micro-programmed control unit V3.
//
// A 4-bit microprogram counter uPC addresses the microcode memory
// (ucode_rom_v3), whose data-path fields drive the datapath. The sequencing
// code of the microinstruction selects the next uPC through a 4-input
// multiplexer: 0 uPC+1, 1 MAP1(opcode), 2 MAP2(opcode), 3 the instruction
// fetch address. As in V1 the selection is unconditional: it never looks
// at datapath status. The two maps (ucode_dispatch_v3) let LW and SW share
// their address computation, so this unit follows the optimized state
// machine FSM2 cycle for cycle. The multiplexer inputs are the document's;
// their numbering and the microcode are this design's. uPC is registered on
// the rising clock edge with synchronous active-high reset to fetch_addr.
module ctrl_micro_v3
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] opcode,
  input  logic [3:0] fetch_addr,
  output ctrl_t      ctrl,
  output logic [3:0] upc
);
  uinstr_v3_t ui;
  logic [3:0] map1, map2, upc_next;

  ucode_rom_v3 u_rom (
    .addr (upc),
    .data (ui)
  );

  ucode_dispatch_v3 u_map (
    .opcode (opcode),
    .map1   (map1),
    .map2   (map2)
  );

  always_comb begin
    unique case (ui.seq)
      US_NEXT:  upc_next = upc + 4'd1;
      US_MAP1:  upc_next = map1;
      US_MAP2:  upc_next = map2;
      default:  upc_next = fetch_addr;
    endcase
  end

  assign ctrl = expand_uctrl(ui.dp);

  always_ff @(posedge clk) begin
    if (rst) upc <= fetch_addr;
    else     upc <= upc_next;
  end
endmodule
