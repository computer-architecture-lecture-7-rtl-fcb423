// Self-checking test of the dispatch map: every opcode against the expected
// microcode start address (0 for undefined opcodes).
module tb_ucode_dispatch;
  logic [5:0] opcode;
  logic [3:0] sa, e;
  int checks = 0, failures = 0;

  ucode_dispatch dut (.opcode, .start_addr(sa));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) begin
      opcode = 6'(o); #1;
      case (o)
        0: e = 2; 13: e = 4; 35: e = 6; 43: e = 9; 4: e = 11; 2: e = 12; default: e = 0;
      endcase
      checks++;
      if (sa !== e) begin failures++; $display("FAIL op=%0d addr=%0d exp=%0d", o, sa, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
