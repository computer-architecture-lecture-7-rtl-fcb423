// Self-checking test of the ALU: random operands for every operation,
// compared with expected results and flags computed in the testbench.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, y;
  alu_op_e     op;
  logic        zero, ovf;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .op(op), .result(y), .zero(zero), .overflow(ovf));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] ey, logic eo);
    #1;
    checks++;
    if (y !== ey || zero !== (ey == 0) || ovf !== eo) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h ovf=%b exp=%b", op, a, b, y, ey, ovf, eo);
    end
  endtask

  initial begin
    logic [32:0] s;
    for (int i = 0; i < 400; i++) begin
      a = $urandom; b = $urandom;
      if (i % 7 == 0) b = a;
      if (i % 11 == 0) begin a = 32'h7fff_ffff; b = 32'h1; end
      if (i % 13 == 0) begin a = 32'h8000_0000; b = 32'h1; end
      op = ALU_ADD; s = {1'b0, a} + {1'b0, b};
      check(s[31:0], (longint'($signed(a)) + longint'($signed(b))) != longint'($signed(a + b)));
      op = ALU_SUB;
      check(a - b, (longint'($signed(a)) - longint'($signed(b))) != longint'($signed(a - b)));
      op = ALU_AND;  check(a & b, 1'b0);
      op = ALU_OR;   check(a | b, 1'b0);
      op = ALU_SLT;  check(($signed(a) < $signed(b)) ? 32'd1 : 32'd0, 1'b0);
      op = ALU_SHL1; check(a * 2, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
