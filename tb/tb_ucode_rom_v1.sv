// Self-checking test of the V1 microcode memory: each word's data-path
// fields against the control-signal table and its sequencing fields against
// the expected uBranch control (3 after fetch/execute, 2 after decode,
// 0 with address 0000 at the end of an instruction).
module tb_ucode_rom_v1;
  import mips_pkg::*;
  import tb_ref_pkg::*;
  logic [3:0] addr;
  uinstr_v1_t data;
  int checks = 0, failures = 0;
  int exp_bc [13] = '{3, 2, 3, 0, 3, 0, 3, 3, 0, 3, 0, 0, 0};

  ucode_rom_v1 dut (.addr, .data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 13; k++) begin
      addr = 4'(k); #1;
      checks += 3;
      if (expand_uctrl(data.dp) !== exp_row(k)) begin failures++; $display("FAIL dp word %0d", k); end
      if (data.br_ctl !== 2'(exp_bc[k])) begin failures++; $display("FAIL bc word %0d", k); end
      if (data.br_addr !== 4'd0) begin failures++; $display("FAIL ba word %0d", k); end
    end
    checks++;
    if ($bits(data) != 23) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
