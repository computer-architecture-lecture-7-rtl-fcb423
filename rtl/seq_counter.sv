// Sequence/jump counter of the counter-based control unit.
//
// A 4-bit register with three controls: Reset (back to T0), Load (micro-jump:
// take the jump address D) and Up (count up). Reset and Load have priority
// over Up; Reset wins over Load. Registered on the rising clock edge.
module seq_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         load,
  input  logic         up,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (reset)     q <= '0;
    else if (load) q <= d;
    else if (up)   q <= q + 1'b1;
  end
endmodule
