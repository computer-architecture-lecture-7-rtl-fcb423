// Self-checking test of the FSM1 PLA control logic: every state, every
// opcode and both overflow values; the control word is compared with the
// control-signal table row of the state and the next state with the FSM1
// diagram extended by the IllegalOp (13) and Overflow (14) states.
module tb_fsm1_pla;
  import mips_pkg::*;
  import tb_ref_pkg::*;
  logic [3:0] state, ns, e;
  logic [5:0] opcode;
  logic       overflow;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  fsm1_pla dut (.state, .opcode, .overflow, .ctrl, .next_state(ns));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      for (int o = 0; o < 64; o++) begin
        for (int v = 0; v < 2; v++) begin
          state = 4'(s); opcode = 6'(o); overflow = v[0];
          #1;
          case (s)
            0: e = 1;
            1: case (o)
                 0: e = 2; 13: e = 4; 35: e = 6; 43: e = 9; 4: e = 11; 2: e = 12;
                 default: e = 13;
               endcase
            2: e = overflow ? 14 : 3;
            4: e = 5;
            6: e = 7;
            7: e = 8;
            9: e = 10;
            default: e = 0;
          endcase
          checks += 2;
          if (ns !== e) begin failures++; $display("FAIL s=%0d op=%0d ovf=%b ns=%0d exp=%0d", s, o, v, ns, e); end
          if (ctrl !== exp_row(s)) begin failures++; $display("FAIL ctrl s=%0d", s); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
