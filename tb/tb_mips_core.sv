// End-to-end test of one core with its default control unit (hardwired FSM1
// with exceptions): runs the demo program, then compares registers, the data
// word, EPC and Cause with the reference model, and the number of cycles
// to reach the halt loop with the model's cycle count (4 per R-type/ORI/SW,
// 5 per LW, 3 per BEQ/J/undefined opcode, 4 per overflowing add).
module tb_mips_core;
  import mips_pkg::*;
  import tb_ref_pkg::*;
  localparam int WORDS = 1024;
  logic clk = 0, rst = 1;
  logic [31:0] pc, ir, epc, cause;
  ctrl_t ctrl;
  logic [14:0] state;
  int checks = 0, failures = 0, cyc = 0, halt_cyc = -1, n_ovf = 0, n_ill = 0;
  mips_iss m;

  mips_core dut (.clk, .rst, .busy(1'b0), .pc, .ir, .epc, .cause, .ctrl, .state);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    m = new(WORDS, 1'b1, 1'b0, 0);
    load_demo(m);
    for (int i = 0; i < WORDS; i++) dut.u_dp.u_mem.mem[i] = m.mem[i];
    m.run(HALT_PC, 10000);
    @(posedge clk); #1 rst = 0;
    while (halt_cyc < 0 && cyc < 5000) begin
      if (ctrl.IRWrite && m.idx(pc) == m.idx(HALT_PC)) halt_cyc = cyc;
      if (ctrl.CauseWrite &&  ctrl.IntCause) n_ovf++;
      if (ctrl.CauseWrite && !ctrl.IntCause) n_ill++;
      @(posedge clk); #1 cyc++;
    end
    chk(32'(halt_cyc), 32'(m.cycles), "cycles to halt");
    for (int r = 1; r < 32; r++) chk(dut.u_dp.u_rf.regs[r], m.r[r], $sformatf("r%0d", r));
    chk(dut.u_dp.u_mem.mem[64], m.mem[64], "mem[0x100]");
    chk(epc, m.epc, "epc");
    chk(cause, m.cause, "cause");
    chk(32'(n_ovf), 1, "overflow exceptions");
    chk(32'(n_ill), 1, "undefined-opcode exceptions");
    $display("cycles=%0d", halt_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
