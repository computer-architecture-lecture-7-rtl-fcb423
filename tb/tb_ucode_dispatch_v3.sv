// Self-checking test of the V3 dispatch maps: all 64 opcodes are applied and
// MAP1 and MAP2 are compared with the expected start addresses (MAP1: R 2,
// ORI 4, LW and SW 6, BEQ 10, J 11; MAP2: LW 7, SW 9; anything else 0).
module tb_ucode_dispatch_v3;
  import mips_pkg::*;
  logic [5:0] opcode;
  logic [3:0] map1, map2;
  int checks = 0, failures = 0;
  int e1, e2;

  ucode_dispatch_v3 dut (.opcode, .map1, .map2);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      opcode = 6'(k); #1;
      case (k)
        'h00: begin e1 = 2;  e2 = 0; end
        'h0D: begin e1 = 4;  e2 = 0; end
        'h23: begin e1 = 6;  e2 = 7; end
        'h2B: begin e1 = 6;  e2 = 9; end
        'h04: begin e1 = 10; e2 = 0; end
        'h02: begin e1 = 11; e2 = 0; end
        default: begin e1 = 0; e2 = 0; end
      endcase
      checks += 2;
      if (map1 !== 4'(e1)) begin failures++; $display("FAIL map1 op %h: %0d", k, map1); end
      if (map2 !== 4'(e2)) begin failures++; $display("FAIL map2 op %h: %0d", k, map2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
