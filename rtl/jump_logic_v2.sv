// Jump logic of the micro-programmed control unit V2.
//
// Turns the next-address code of the current microinstruction and the
// datapath status signals Zero and Busy into the select of the sequencing
// multiplexer (0 absolute fetch address, 1 dispatch map, 2 uPC, 3 uPC+1):
//   next     -> uPC+1
//   spin     -> Busy ? uPC : uPC+1
//   fetch    -> absolute
//   dispatch -> map(opcode)
//   feqz     -> Zero ? absolute : uPC+1
//   fnez     -> Zero ? uPC+1 : absolute
// The six codes and their meaning are the document's; the 3-bit encoding and
// the mux input numbering are this design's. Combinational.
module jump_logic_v2
  import mips_pkg::*;
(
  input  unext_e     next,
  input  logic       zero,
  input  logic       busy,
  output logic [1:0] sel
);
  localparam logic [1:0] SEL_ABS = 2'd0;
  localparam logic [1:0] SEL_MAP = 2'd1;
  localparam logic [1:0] SEL_UPC = 2'd2;
  localparam logic [1:0] SEL_INC = 2'd3;

  always_comb begin
    unique case (next)
      UN_NEXT:     sel = SEL_INC;
      UN_SPIN:     sel = busy ? SEL_UPC : SEL_INC;
      UN_FETCH:    sel = SEL_ABS;
      UN_DISPATCH: sel = SEL_MAP;
      UN_FEQZ:     sel = zero ? SEL_ABS : SEL_INC;
      UN_FNEZ:     sel = zero ? SEL_INC : SEL_ABS;
      default:     sel = SEL_ABS;
    endcase
  end
endmodule
