// Unified instruction and data memory of the multi-cycle datapath.
//
// One port serves both instruction fetch and data access (IorD selects the
// address in the datapath). The address is a byte address; bits [1:0] are
// ignored and the upper bits beyond the array size wrap, so the exception
// vector 0x8000_0180 lands on word 0x60. Reads are combinational when
// MemRead is high (the datapath latches the word into IR or MDR at the clock
// edge); writes happen on the rising edge when MemWrite is high. The size is
// this design's choice; contents are not reset (a testbench loads them).
module unified_memory #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        mem_read,
  input  logic        mem_write,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  logic [31:0] mem [WORDS];
  logic [AW-1:0] idx;

  assign idx   = addr[AW+1:2];
  assign rdata = mem_read ? mem[idx] : '0;

  always_ff @(posedge clk) begin
    if (mem_write) mem[idx] <= wdata;
  end
endmodule
