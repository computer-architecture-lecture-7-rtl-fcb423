// Self-checking test of the V4 microcode memory. Words 0..12 must carry the
// data-path fields of the control-signal table rows, with SCWrite added to
// decode. Words 13..15 must be the sll program: pass A with count-down,
// shift ALUOut with count-down, write back. Every word's uBranch address,
// uBranch control and condition code are compared with the expected
// sequencing.
module tb_ucode_rom_v4;
  import mips_pkg::*;
  import tb_ref_pkg::*;
  logic [3:0] addr;
  uinstr_v4_t data;
  ctrl_t got, exp;
  int checks = 0, failures = 0;
  int exp_bc [16] = '{3, 2, 3, 0, 3, 0, 3, 3, 0, 3, 0, 0, 0, 0, 0, 0};
  int exp_ba [16] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 15, 14, 0};
  int exp_cd [16] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 2, 0};

  ucode_rom_v4 dut (.addr, .data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      addr = 4'(k); #1;
      got = expand_uctrl(data.dp);
      got.ALUSrcA = {data.src_aluout, data.dp.ALUSrcA};
      got.SCWrite = data.sc_write;
      got.SCEn = data.sc_en;
      if (k <= 12) exp = exp_row(k);
      else exp = '0;
      case (k)
        1:  exp.SCWrite = 1'b1;
        13: begin exp.ALUSrcA = 2'd1; exp.ALUSrcB = 2'd0; exp.ALUOp = aluop_e'(2'(ADD)); exp.SCEn = 1'b1; end
        14: begin exp.ALUSrcA = 2'd2; exp.ALUOp = aluop_e'(2'(FUN)); exp.SCEn = 1'b1; end
        15: begin exp.RegDst = 1'b1; exp.RegWrite = 1'b1; end
        default: ;
      endcase
      checks += 4;
      if (got !== exp) begin failures++; $display("FAIL dp word %0d: %h expected %h", k, got, exp); end
      if (data.br_ctl !== 2'(exp_bc[k])) begin failures++; $display("FAIL bc word %0d", k); end
      if (data.br_addr !== 4'(exp_ba[k])) begin failures++; $display("FAIL ba word %0d", k); end
      if (data.cond !== ucond_v4_e'(exp_cd[k])) begin failures++; $display("FAIL cond word %0d", k); end
    end
    checks++;
    if ($bits(data) != 28) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
