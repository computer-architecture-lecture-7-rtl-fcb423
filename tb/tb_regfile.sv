// Self-checking test of the register file: random writes and reads on both
// ports against a shadow array; register 0 must always read zero.
module tb_regfile;
  logic clk = 0, rst = 1, we = 0;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      we = ($urandom % 2) == 1;
      wa = 5'($urandom);
      wd = $urandom;
      ra1 = 5'($urandom);
      ra2 = 5'($urandom);
      #1;
      checks += 2;
      if (rd1 !== shadow[ra1]) begin failures++; $display("FAIL rd1 r%0d=%h exp %h", ra1, rd1, shadow[ra1]); end
      if (rd2 !== shadow[ra2]) begin failures++; $display("FAIL rd2 r%0d=%h exp %h", ra2, rd2, shadow[ra2]); end
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
