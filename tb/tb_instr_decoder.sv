// Self-checking test of the instruction decoder: every opcode, with sll and
// other funct values for R-type, must raise exactly the expected line.
module tb_instr_decoder;
  import mips_pkg::*;
  logic [5:0] opcode, funct;
  ins_t ins, e;
  int checks = 0, failures = 0;

  instr_decoder dut (.opcode, .funct, .ins);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f += 3) begin
        opcode = 6'(o); funct = 6'(f);
        #1;
        e = '0;
        case (o)
          0:  if (f == 0) e.sll = 1; else e.r = 1;
          13: e.ori = 1;
          35: e.lw = 1;
          43: e.sw = 1;
          4:  e.beq = 1;
          2:  e.j = 1;
          default: ;
        endcase
        checks++;
        if (ins !== e) begin failures++; $display("FAIL op=%0d fn=%0d ins=%b exp=%b", o, f, ins, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
