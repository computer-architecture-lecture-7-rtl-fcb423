// Self-checking test of the ALU control: every ALUOp value with every funct
// code, against a table of expected ALU operations.
module tb_alu_control;
  import mips_pkg::*;
  aluop_e     aluop;
  logic [5:0] funct;
  alu_op_e    op, exp_op;
  int checks = 0, failures = 0;

  alu_control dut (.aluop(aluop), .funct(funct), .op(op));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 4; o++) begin
      for (int f = 0; f < 64; f++) begin
        aluop = aluop_e'(2'(o));
        funct = 6'(f);
        #1;
        if (o == 0)      exp_op = ALU_ADD;
        else if (o == 1) exp_op = ALU_SUB;
        else if (o == 3) exp_op = ALU_OR;
        else if (f == 32) exp_op = ALU_ADD;
        else if (f == 34) exp_op = ALU_SUB;
        else if (f == 36) exp_op = ALU_AND;
        else if (f == 37) exp_op = ALU_OR;
        else if (f == 42) exp_op = ALU_SLT;
        else if (f == 0)  exp_op = ALU_SHL1;
        else              exp_op = ALU_ADD;
        checks++;
        if (op !== exp_op) begin
          failures++;
          $display("FAIL aluop=%0d funct=%0d op=%0d exp=%0d", o, f, op, exp_op);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
