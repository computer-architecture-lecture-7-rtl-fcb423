// 32-bit ALU of the multi-cycle datapath.
//
// Computes add, sub, and, or, set-on-less-than and a 1-bit left shift of
// operand a. The shift is one bit per cycle because the variable-length SLL
// repeats it under control of the shift counter. Zero is high when the result
// is zero (used by BEQ through PCWriteCond). Overflow is the signed overflow
// of add and sub, which sends an R-type instruction to the Overflow exception
// state. Purely combinational. The operation set beyond add/sub/or and the
// 1-bit shift is this design's choice.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] result,
  output logic             zero,
  output logic             overflow
);
  logic [WIDTH-1:0] sum, diff;

  always_comb begin
    sum  = a + b;
    diff = a - b;
    overflow = 1'b0;
    unique case (op)
      ALU_ADD: begin
        result   = sum;
        overflow = (a[WIDTH-1] == b[WIDTH-1]) && (sum[WIDTH-1] != a[WIDTH-1]);
      end
      ALU_SUB: begin
        result   = diff;
        overflow = (a[WIDTH-1] != b[WIDTH-1]) && (diff[WIDTH-1] != a[WIDTH-1]);
      end
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_SLT:  result = {{(WIDTH-1){1'b0}}, $signed(a) < $signed(b)};
      ALU_SHL1: result = {a[WIDTH-2:0], 1'b0};
      default:  result = sum;
    endcase
    zero = (result == '0);
  end
endmodule
