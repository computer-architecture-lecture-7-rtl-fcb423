// SCnt: the shift counter of the variable-length SLL instruction.
//
// A 5-bit down counter with parallel load of the shift amount sa
// (IR[10:6]) when SCWrite is high, count-down when SCEn is high, and a zero
// detector ZeroC. Load has priority over counting. Registered on the rising
// edge; ZeroC is combinational from the count. The load/enable/zero
// interface follows the datapath extension for SLL; reset to zero and the
// load-over-count priority are this design's choices.
module shift_counter #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         sc_write,
  input  logic         sc_en,
  input  logic [W-1:0] sa,
  output logic [W-1:0] count,
  output logic         zero_c
);
  always_ff @(posedge clk) begin
    if (rst)           count <= '0;
    else if (sc_write) count <= sa;
    else if (sc_en)    count <= count - 1'b1;
  end
  assign zero_c = (count == '0);
endmodule
