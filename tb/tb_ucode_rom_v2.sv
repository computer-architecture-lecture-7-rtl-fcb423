// Self-checking test of the V2 microcode memory: each word's data-path
// fields against the control-signal table and its next-address code against
// the expected sequencing.
module tb_ucode_rom_v2;
  import mips_pkg::*;
  import tb_ref_pkg::*;
  logic [3:0] addr;
  uinstr_v2_t data;
  int checks = 0, failures = 0;
  // 0 next, 1 spin, 2 fetch, 3 dispatch
  int exp_nx [13] = '{0, 3, 0, 2, 0, 2, 0, 1, 2, 0, 2, 2, 2};

  ucode_rom_v2 dut (.addr, .data);

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
      if (expand_uctrl(data.dp) !== exp_row_v2(k)) begin failures++; $display("FAIL dp word %0d", k); end
      if (data.next !== unext_e'(3'(exp_nx[k]))) begin failures++; $display("FAIL next word %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
