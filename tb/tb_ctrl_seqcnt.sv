// Self-checking test of ctrl_seqcnt: random instruction streams (including undefined
// opcodes, variable-length sll) are run and the control word is compared every cycle with the
// sequence expected from the control-signal table; the number of cycles per
// instruction is checked through the length of that sequence.
module tb_ctrl_seqcnt;
  import mips_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1;
  logic [5:0] opcode = 6'h3F, op, fn;
  logic [4:0] sa;
  bit ovf;
  ctrl_t ctrl;
  ctrl_q_t q;
  int checks = 0, failures = 0, ninstr = 0, ncyc = 0, min_len = 99, max_len = 0;
  logic zero_c;
  logic [4:0] scnt = 0;
  ins_t ins;
  logic [3:0] step;
  ctrl_seqcnt dut (.clk, .rst, .ins, .zero_c, .ctrl, .step);
  assign zero_c = (scnt == 0);
  always @(posedge clk) if (ctrl.SCWrite) scnt <= sa; else if (ctrl.SCEn) scnt <= scnt - 1;
  always_comb begin
    ins = '0;
    ins.r = (opcode == 0) && (fn != 0); ins.sll = (opcode == 0) && (fn == 0);
    ins.ori = opcode == 6'h0D; ins.lw = opcode == 6'h23; ins.sw = opcode == 6'h2B;
    ins.beq = opcode == 6'h04; ins.j = opcode == 6'h02;
  end
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;

    for (int n = 0; n < 600; n++) begin
      op = rand_op(); fn = rand_fn(); sa = 5'($urandom % 6); ovf = ($urandom % 3) == 0;
      q = exp_seq(V_SEQCNT, op, fn, sa, ovf);
      if (q.size() < min_len) min_len = q.size();
      if (q.size() > max_len) max_len = q.size();
      ninstr++;
      for (int i = 0; i < q.size(); i++) begin
        if (i == 1) opcode = op;

        #1;
        checks++;
        if (ctrl !== q[i]) begin
          failures++;
          if (failures < 10) $display("FAIL instr %0d op=%h fn=%h sa=%0d step %0d: ctrl=%h exp=%h",
                                      n, op, fn, sa, i, ctrl, q[i]);
        end
        @(posedge clk); #1;
        ncyc++;
      end
    end
    $display("instructions=%0d cycles=%0d min_len=%0d max_len=%0d", ninstr, ncyc, min_len, max_len);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
