// Self-checking test of the V3 microcode memory: each word's data-path
// fields against the row of the control-signal table it implements (the
// shared address step against the LW/SW execute row), its sequencing code
// against the FSM2 flow (fetch -> next, decode -> MAP1, address step ->
// MAP2, LW memory -> next, every last step -> fetch), unused words, and the
// 19-bit word width.
module tb_ucode_rom_v3;
  import mips_pkg::*;
  import tb_ref_pkg::*;
  logic [3:0] addr;
  uinstr_v3_t data;
  int checks = 0, failures = 0;
  // table row implemented by each word, and its sequencing code
  int row [12]  = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 10, 11, 12};
  int seq [12]  = '{0, 1, 0, 3, 0, 3, 2, 0, 3, 3, 3, 3};

  ucode_rom_v3 dut (.addr, .data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 12; k++) begin
      addr = 4'(k); #1;
      checks += 2;
      if (expand_uctrl(data.dp) !== exp_row(row[k])) begin failures++; $display("FAIL dp word %0d", k); end
      if (data.seq !== useq_v3_e'(seq[k])) begin failures++; $display("FAIL seq word %0d", k); end
    end
    for (int k = 12; k < 16; k++) begin
      addr = 4'(k); #1;
      checks++;
      if (expand_uctrl(data.dp) !== CTRL_IDLE || data.seq !== US_FETCH) begin
        failures++; $display("FAIL unused word %0d", k);
      end
    end
    checks++;
    if ($bits(data) != 19) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
