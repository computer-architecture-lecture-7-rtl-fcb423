// Self-checking test of the short-word V1 microcode memory: each word's
// data-path fields against the control-signal table, and its uBranch
// control against the expected sequencing (3 after fetch/execute, 2 after
// decode, 1 = external source at the end of an instruction). Unused
// addresses must return to fetch, and the word must be 19 bits wide.
module tb_ucode_rom_v1e;
  import mips_pkg::*;
  import tb_ref_pkg::*;
  logic [3:0] addr;
  uinstr_v1e_t data;
  int checks = 0, failures = 0;
  int exp_bc [13] = '{3, 2, 3, 1, 3, 1, 3, 3, 1, 3, 1, 1, 1};

  ucode_rom_v1e dut (.addr, .data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 13; k++) begin
      addr = 4'(k); #1;
      checks += 2;
      if (expand_uctrl(data.dp) !== exp_row(k)) begin failures++; $display("FAIL dp word %0d", k); end
      if (data.br_ctl !== 2'(exp_bc[k])) begin failures++; $display("FAIL bc word %0d", k); end
    end
    for (int k = 13; k < 16; k++) begin
      addr = 4'(k); #1;
      checks++;
      if (data !== uinstr_v1e_t'({17'h0, 2'd1})) begin failures++; $display("FAIL unused word %0d", k); end
    end
    checks++;
    if ($bits(data) != 19) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
