// Self-checking test of the datapath. The testbench acts as the control
// unit: for each instruction of the demo program it drives the control
// words of the control-signal table (with the exception states and the
// variable-length sll sequence), then compares PC, EPC, Cause, every
// register and the data word with the reference model.
module tb_mips_datapath;
  import mips_pkg::*;
  import tb_ref_pkg::*;
  localparam int WORDS = 1024;
  logic clk = 0, rst = 1;
  ctrl_t ctrl = '0;
  logic [5:0] opcode, funct;
  logic zero, overflow, zero_c;
  logic [31:0] pc, ir, epc, cause;
  int checks = 0, failures = 0;
  mips_iss m;

  mips_datapath #(.MEM_WORDS(WORDS)) dut (.clk, .rst, .ctrl, .opcode, .funct, .zero, .overflow,
                                          .zero_c, .pc, .ir, .epc, .cause);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] inst;
    int unsigned novf;
    ctrl_q_t q;
    m = new(WORDS, 1'b1, 1'b1, 0);
    load_demo(m);
    for (int i = 0; i < WORDS; i++) dut.u_mem.mem[i] = m.mem[i];
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 200 && m.idx(m.pc) != m.idx(HALT_PC); n++) begin
      inst = m.mem[m.idx(m.pc)];
      novf = m.n_ovf;
      m.step();
      if (inst[31:26] == 6'h00 && inst[5:0] == 6'h00)
        q = exp_seq(V_SEQCNT, inst[31:26], inst[5:0], inst[10:6], 1'b0);
      else
        q = exp_seq(V_FSM1, inst[31:26], inst[5:0], inst[10:6], m.n_ovf != novf);
      foreach (q[i]) begin
        ctrl = q[i];
        #1;
        if (i == 2 && m.n_ovf != novf) begin
          checks++;
          if (!overflow) begin failures++; $display("FAIL overflow flag not raised"); end
        end
        @(posedge clk); #1;
      end
      ctrl = '0;
      chk(pc, m.pc, "pc");
      chk(epc, m.epc, "epc");
      chk(cause, m.cause, "cause");
      for (int r = 1; r < 32; r++) chk(dut.u_rf.regs[r], m.r[r], $sformatf("r%0d", r));
      chk(dut.u_mem.mem[64], m.mem[64], "mem[0x100]");
    end
    chk(m.idx(pc), m.idx(HALT_PC), "reached halt");
    checks++;
    if (m.n_ovf == 0 || m.n_ill == 0 || m.n_sll_rep == 0 || m.n_beq_t == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
