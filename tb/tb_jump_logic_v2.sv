// Self-checking test of the V2 jump logic: all next-address codes with all
// Zero/Busy combinations against the expected mux select
// (0 absolute, 1 map, 2 uPC, 3 uPC+1).
module tb_jump_logic_v2;
  import mips_pkg::*;
  unext_e     next;
  logic       zero, busy;
  logic [1:0] sel, e;
  int checks = 0, failures = 0;

  jump_logic_v2 dut (.next, .zero, .busy, .sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 6; n++) begin
      for (int zb = 0; zb < 4; zb++) begin
        next = unext_e'(3'(n)); zero = zb[0]; busy = zb[1];
        #1;
        case (n)
          0: e = 3;
          1: e = busy ? 2 : 3;
          2: e = 0;
          3: e = 1;
          4: e = zero ? 0 : 3;
          default: e = zero ? 3 : 0;
        endcase
        checks++;
        if (sel !== e) begin failures++; $display("FAIL next=%0d z=%b b=%b sel=%0d exp=%0d", n, zero, busy, sel, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
