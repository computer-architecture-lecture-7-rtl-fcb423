// End-to-end test of the top level at its default size: the demo program is
// loaded into all nine cores, which run side by side until each reaches its
// halt loop (mem_busy is held high for the first two cycles of every LW
// Memory step of the V2 core, so that core spins). For each core the
// registers, the stored data word, EPC and Cause are compared with a
// reference model configured like that core's control unit, and the cycles
// to reach the halt loop with the model's cycle count (plus the spin cycles
// for V2 and the Start cycle of the one-hot unit). Each mechanism must occur
// at least once: overflow and undefined-opcode exceptions (FSM1), the
// repeated sll step (one-hot and sequence counter), the merged LW/SW address
// state (FSM2), spinning (V2), the return to fetch through the external
// source (short-word V1), the MAP2 dispatch (V3), the conditional sll loop
// (V4), taken and not-taken branches, jumps, loads and stores.
module tb_mips_multicycle_top;
  import mips_pkg::*;
  import tb_ref_pkg::*;
  localparam int WORDS = 1024;   // default memory size of the top
  logic clk = 0, rst = 1, mem_busy = 0;
  logic [31:0] pc [9], ir [9], epc [9], cause [9];
  ctrl_t ctrl [9];
  logic [14:0] state [9];
  int checks = 0, failures = 0, cyc = 0;
  int halt_cyc [9] = '{-1, -1, -1, -1, -1, -1, -1, -1, -1};
  int busy_run = 0;
  int n_ovf = 0, n_ill = 0, n_rep_oh = 0, n_rep_sc = 0, n_addr_f2 = 0, n_spin = 0, n_ext = 0, n_map2 = 0, n_rep_v4 = 0;
  mips_iss m [9];
  string names [9] = '{"fsm1", "fsm2", "onehot", "seqcnt", "micro_v1", "micro_v2", "micro_v1e", "micro_v3", "micro_v4"};

  mips_multicycle_top dut (.clk, .rst, .mem_busy, .pc, .ir, .epc, .cause, .ctrl, .state);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  task automatic mech(int count, string what);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  function automatic bit all_halted();
    foreach (halt_cyc[k]) if (halt_cyc[k] < 0) return 0;
    return 1;
  endfunction

  initial begin
    logic [31:0] rf [9][32];
    logic [31:0] dword [9];
    m[0] = new(WORDS, 1'b1, 1'b0, 0);
    m[1] = new(WORDS, 1'b0, 1'b0, 2);
    m[2] = new(WORDS, 1'b0, 1'b1, 2);
    m[3] = new(WORDS, 1'b0, 1'b1, 3);
    m[4] = new(WORDS, 1'b0, 1'b0, 2);
    m[5] = new(WORDS, 1'b0, 1'b0, 2);
    m[6] = new(WORDS, 1'b0, 1'b0, 2);
    m[7] = new(WORDS, 1'b0, 1'b0, 2);
    m[8] = new(WORDS, 1'b0, 1'b1, 2);
    m[8].sll_pass_step = 1'b1;
    foreach (m[k]) begin
      load_demo(m[k]);
    end
    for (int i = 0; i < WORDS; i++) begin
      dut.u_fsm1.u_dp.u_mem.mem[i]     = m[0].mem[i];
      dut.u_fsm2.u_dp.u_mem.mem[i]     = m[0].mem[i];
      dut.u_onehot.u_dp.u_mem.mem[i]   = m[0].mem[i];
      dut.u_seqcnt.u_dp.u_mem.mem[i]   = m[0].mem[i];
      dut.u_micro_v1.u_dp.u_mem.mem[i] = m[0].mem[i];
      dut.u_micro_v2.u_dp.u_mem.mem[i] = m[0].mem[i];
      dut.u_micro_v1e.u_dp.u_mem.mem[i] = m[0].mem[i];
      dut.u_micro_v3.u_dp.u_mem.mem[i] = m[0].mem[i];
      dut.u_micro_v4.u_dp.u_mem.mem[i] = m[0].mem[i];
    end
    foreach (m[k]) m[k].run(HALT_PC, 10000);
    @(posedge clk); #1 rst = 0;
    while (!all_halted() && cyc < 5000) begin
      // memory busy for the first two cycles of every V2 LW Memory step
      mem_busy = (state[5] == 15'(UA_EX_LW + 1)) && (busy_run < 2);
      #1;
      for (int k = 0; k < 9; k++)
        if (halt_cyc[k] < 0 && ctrl[k].IRWrite && m[k].idx(pc[k]) == m[k].idx(HALT_PC))
          halt_cyc[k] = cyc;
      if (ctrl[0].CauseWrite &&  ctrl[0].IntCause) n_ovf++;
      if (ctrl[0].CauseWrite && !ctrl[0].IntCause) n_ill++;
      if (ctrl[2].SCEn && ctrl[2].ALUSrcA == 2'd2) n_rep_oh++;
      if (ctrl[3].SCEn && ctrl[3].ALUSrcA == 2'd2) n_rep_sc++;
      if (state[1] == 15'd6) n_addr_f2++;
      if (halt_cyc[5] < 0 && state[5] == 15'(UA_EX_LW + 1) && mem_busy) n_spin++;
      // last steps of an instruction: the short-word V1 returns to fetch through
      // the external source there
      if (halt_cyc[6] < 0 && state[6] inside {15'd3, 15'd5, 15'd8, 15'd10, 15'd11, 15'd12}) n_ext++;
      if (state[7] == 15'(UA3_ADDR)) n_map2++;
      if (state[8] == 15'(UA4_SLL_SH)) n_rep_v4++;
      busy_run = (state[5] == 15'(UA_EX_LW + 1)) ? busy_run + 1 : 0;
      @(posedge clk); #1 cyc++;
    end
    for (int r = 0; r < 32; r++) begin
      rf[0][r] = dut.u_fsm1.u_dp.u_rf.regs[r];
      rf[1][r] = dut.u_fsm2.u_dp.u_rf.regs[r];
      rf[2][r] = dut.u_onehot.u_dp.u_rf.regs[r];
      rf[3][r] = dut.u_seqcnt.u_dp.u_rf.regs[r];
      rf[4][r] = dut.u_micro_v1.u_dp.u_rf.regs[r];
      rf[5][r] = dut.u_micro_v2.u_dp.u_rf.regs[r];
      rf[6][r] = dut.u_micro_v1e.u_dp.u_rf.regs[r];
      rf[7][r] = dut.u_micro_v3.u_dp.u_rf.regs[r];
      rf[8][r] = dut.u_micro_v4.u_dp.u_rf.regs[r];
    end
    dword[0] = dut.u_fsm1.u_dp.u_mem.mem[64];
    dword[1] = dut.u_fsm2.u_dp.u_mem.mem[64];
    dword[2] = dut.u_onehot.u_dp.u_mem.mem[64];
    dword[3] = dut.u_seqcnt.u_dp.u_mem.mem[64];
    dword[4] = dut.u_micro_v1.u_dp.u_mem.mem[64];
    dword[5] = dut.u_micro_v2.u_dp.u_mem.mem[64];
    dword[6] = dut.u_micro_v1e.u_dp.u_mem.mem[64];
    dword[7] = dut.u_micro_v3.u_dp.u_mem.mem[64];
    dword[8] = dut.u_micro_v4.u_dp.u_mem.mem[64];
    for (int k = 0; k < 9; k++) begin
      int exp_cyc;
      exp_cyc = int'(m[k].cycles) + ((k == 2) ? 1 : 0) + ((k == 5) ? n_spin : 0);
      $display("core %-8s cycles to halt %0d (expected %0d)", names[k], halt_cyc[k], exp_cyc);
      chk(32'(halt_cyc[k]), 32'(exp_cyc), {names[k], " cycles"});
      for (int r = 1; r < 32; r++) chk(rf[k][r], m[k].r[r], $sformatf("%s r%0d", names[k], r));
      chk(dword[k], m[k].mem[64], {names[k], " data word"});
      chk(epc[k], m[k].epc, {names[k], " epc"});
      chk(cause[k], m[k].cause, {names[k], " cause"});
    end
    mech(n_ovf, "overflow exception (fsm1)");
    mech(n_ill, "undefined opcode exc (fsm1)");
    mech(n_rep_oh, "sll repeat step (onehot)");
    mech(n_rep_sc, "sll ldT3 micro-jump (seqcnt)");
    mech(n_addr_f2, "merged address state (fsm2)");
    mech(n_spin, "spin on busy (micro_v2)");
    mech(n_ext, "fetch via external source (v1e)");
    mech(n_map2, "MAP2 dispatch (micro_v3)");
    mech(n_rep_v4, "sll conditional loop (micro_v4)");
    mech(int'(m[1].n_beq_t), "branch taken");
    mech(int'(m[1].n_beq_n), "branch not taken");
    mech(int'(m[1].n_j), "jump");
    mech(int'(m[1].n_lw), "load");
    mech(int'(m[1].n_sw), "store");
    mech(int'(m[1].n_ill), "undefined opcode skipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
