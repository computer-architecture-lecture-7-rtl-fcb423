// Reference material shared by the testbenches: instruction encoders, the
// expected control word of every control step written out row by row from
// the control-signal table (independently of the RTL's own helpers), and an
// instruction-level reference model of the MIPS-lite processor with its
// cycle count per instruction.
package tb_ref_pkg;
  import mips_pkg::*;

  // ---------------------------------------------------------------- encoders
  function automatic logic [31:0] enc_r(logic [5:0] fn, logic [4:0] rs, logic [4:0] rt,
                                        logic [4:0] rd, logic [4:0] sa = 5'd0);
    return {6'h00, rs, rt, rd, sa, fn};
  endfunction
  function automatic logic [31:0] enc_i(logic [5:0] op, logic [4:0] rs, logic [4:0] rt,
                                        logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction
  function automatic logic [31:0] enc_j(logic [31:0] target);
    return {6'h02, target[27:2]};
  endfunction

  // -------------------------------------------- control-signal table rows
  // Columns: IorD MemRead MemWrite IRWrite RegDst MemtoReg RegWrite ExtOp
  //          ALUSrcA ALUSrcB ALUOp PCSrc PCWrCd PCWr (don't-cares as 0)
  function automatic ctrl_t row(int iord, int mr, int mw, int irw, int rd, int m2r, int rw,
                                int ext, int sa, int sb, int op, int pcs, int wc, int pw);
    ctrl_t c = '0;
    c.IorD = 1'(iord); c.MemRead = 1'(mr); c.MemWrite = 1'(mw); c.IRWrite = 1'(irw);
    c.RegDst = 1'(rd); c.MemtoReg = 1'(m2r); c.RegWrite = 1'(rw); c.ExtOp = 1'(ext);
    c.ALUSrcA = 2'(sa); c.ALUSrcB = 2'(sb); c.ALUOp = aluop_e'(2'(op));
    c.PCSrc = 2'(pcs); c.PCWrCd = 1'(wc); c.PCWr = 1'(pw);
    return c;
  endfunction

  localparam int ADD = 0, SUB = 1, FUN = 2, OR = 3;

  // Index: 0 IF, 1 ID, 2 ExR, 3 WbR, 4 ExORI, 5 WbORI, 6 ExLW, 7 MLW, 8 WbLW,
  // 9 ExSW, 10 MSW, 11 ExBEQ, 12 ExJ, 13 IllegalOp, 14 Overflow
  function automatic ctrl_t exp_row(int k);
    ctrl_t c;
    case (k)
      0:  c = row(0,1,0,1, 0,0,0, 0, 0,1,ADD, 0,0,1);
      1:  c = row(0,0,0,0, 0,0,0, 1, 0,3,ADD, 0,0,0);
      2:  c = row(0,0,0,0, 0,0,0, 0, 1,0,FUN, 0,0,0);
      3:  c = row(0,0,0,0, 1,0,1, 0, 0,0,ADD, 0,0,0);
      4:  c = row(0,0,0,0, 0,0,0, 0, 1,2,OR,  0,0,0);
      5:  c = row(0,0,0,0, 0,0,1, 0, 0,0,ADD, 0,0,0);
      6:  c = row(0,0,0,0, 0,0,0, 1, 1,2,ADD, 0,0,0);
      7:  c = row(1,1,0,0, 0,0,0, 0, 0,0,ADD, 0,0,0);
      8:  c = row(0,0,0,0, 0,1,1, 0, 0,0,ADD, 0,0,0);
      9:  c = row(0,0,0,0, 0,0,0, 1, 1,2,ADD, 0,0,0);
      10: c = row(1,0,1,0, 0,0,0, 0, 0,0,ADD, 0,0,0);
      11: c = row(0,0,0,0, 0,0,0, 0, 1,0,SUB, 1,1,0);
      12: c = row(0,0,0,0, 0,0,0, 0, 0,0,ADD, 2,0,1);
      13, 14: begin
        c = row(0,0,0,0, 0,0,0, 0, 0,1,SUB, 3,0,1);
        c.EPCWrite = 1'b1; c.CauseWrite = 1'b1; c.IntCause = (k == 14);
      end
      default: c = '0;
    endcase
    return c;
  endfunction

  // --------------------------------------------------- reference model
  class mips_iss;
    int unsigned words;
    bit          exc;        // takes IllegalOp / Overflow exceptions
    bit          sll_full;   // sll shifts by sa (else one 1-bit shift)
    int unsigned ill_cycles; // cycles spent on an undefined opcode without exceptions
    bit          sll_pass_step = 1'b0; // sll has a separate pass step (V4): 4 + sa cycles
    logic [31:0] mem [];
    logic [31:0] r [32];
    logic [31:0] pc, epc, cause;
    longint unsigned cycles;
    int unsigned n_r, n_ori, n_lw, n_sw, n_beq_t, n_beq_n, n_j, n_sll, n_sll_rep, n_ovf, n_ill;

    function new(int unsigned words_, bit exc_, bit sll_full_, int unsigned ill_cycles_);
      words = words_; exc = exc_; sll_full = sll_full_; ill_cycles = ill_cycles_;
      mem = new[words];
      foreach (mem[i]) mem[i] = '0;
      foreach (r[i]) r[i] = '0;
      pc = '0; epc = '0; cause = '0; cycles = 0;
      n_r = 0; n_ori = 0; n_lw = 0; n_sw = 0; n_beq_t = 0; n_beq_n = 0; n_j = 0;
      n_sll = 0; n_sll_rep = 0; n_ovf = 0; n_ill = 0;
    endfunction

    function int unsigned idx(logic [31:0] a);
      return int'(a >> 2) % words;
    endfunction

    function void wr(logic [4:0] d, logic [31:0] v);
      if (d != 0) r[d] = v;
    endfunction

    // Run until the PC (modulo the memory size) reaches `halt`
    function void run(logic [31:0] halt, int max_steps);
      for (int i = 0; i < max_steps; i++) begin
        if (idx(pc) == idx(halt)) return;
        step();
      end
    endfunction

    function void step();
      logic [31:0] ins, a, b, res, simm, zimm;
      logic [5:0]  op, fn;
      logic [4:0]  rs, rt, rd, sa;
      ins = mem[idx(pc)];
      op = ins[31:26]; rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
      sa = ins[10:6]; fn = ins[5:0];
      a = r[rs]; b = r[rt];
      simm = {{16{ins[15]}}, ins[15:0]};
      zimm = {16'h0, ins[15:0]};
      pc = pc + 4;
      case (op)
        OP_RTYPE: begin
          if (fn == FN_SLL) begin
            n_sll++;
            if (sll_full) begin
              res = a << sa;
              cycles += sll_pass_step ? 4 + sa : 3 + ((sa == 0) ? 1 : sa);
              if (sa > 1) n_sll_rep++;
            end else begin
              res = a << 1;
              cycles += 4;
            end
            wr(rd, res);
          end else begin
            logic ovf;
            ovf = 1'b0;
            case (fn)
              FN_ADD: begin res = a + b; ovf = (a[31] == b[31]) && (res[31] != a[31]); end
              FN_SUB: begin res = a - b; ovf = (a[31] != b[31]) && (res[31] != a[31]); end
              FN_AND: res = a & b;
              FN_OR:  res = a | b;
              FN_SLT: res = {31'h0, $signed(a) < $signed(b)};
              default: res = a + b;
            endcase
            if (exc && ovf) begin
              n_ovf++;
              epc = pc - 4; cause = 32'd1; pc = EXC_VECTOR;
              cycles += 4;
            end else begin
              n_r++;
              wr(rd, res);
              cycles += 4;
            end
          end
        end
        OP_ORI: begin n_ori++; wr(rt, a | zimm); cycles += 4; end
        OP_LW:  begin n_lw++;  wr(rt, mem[idx(a + simm)]); cycles += 5; end
        OP_SW:  begin n_sw++;  mem[idx(a + simm)] = b; cycles += 4; end
        OP_BEQ: begin
          if (a == b) begin n_beq_t++; pc = pc + (simm << 2); end
          else n_beq_n++;
          cycles += 3;
        end
        OP_J: begin n_j++; pc = {pc[31:28], ins[25:0], 2'b00}; cycles += 3; end
        default: begin
          n_ill++;
          if (exc) begin
            epc = pc - 4; cause = 32'd0; pc = EXC_VECTOR;
            cycles += 3;
          end else begin
            cycles += ill_cycles;
          end
        end
      endcase
    endfunction
  endclass

  // V2 holds the address computation during LW Memory, where it may spin
  function automatic ctrl_t exp_row_v2(int k);
    ctrl_t c = exp_row(k);
    if (k == 7) begin c.ExtOp = 1'b1; c.ALUSrcA = 2'd1; c.ALUSrcB = 2'd2; end
    return c;
  endfunction

  // ------------------------------------- expected control-word sequences
  typedef enum int { V_FSM1, V_FSM2, V_MICRO, V_MICRO2, V_ONEHOT, V_SEQCNT, V_MICRO4 } variant_e;
  typedef ctrl_t ctrl_q_t [$];

  // Control words one instruction produces, cycle by cycle, for a control
  // unit variant. `ovf` is the ALU overflow seen in R-type execution.
  function automatic ctrl_q_t exp_seq(variant_e v, logic [5:0] op, logic [5:0] fn,
                                      logic [4:0] sa, bit ovf);
    ctrl_q_t q;
    ctrl_t c;
    bit full_sll = (v == V_ONEHOT) || (v == V_SEQCNT) || (v == V_MICRO4);
    q.push_back(exp_row(0));
    c = exp_row(1);
    if (full_sll) c.SCWrite = 1'b1;
    q.push_back(c);
    case (op)
      6'h00: begin
        if (fn == 6'h00 && v == V_MICRO4) begin
          // pass A and count down, then one shift per count, then write back
          c = '0; c.ALUSrcA = 2'd1; c.ALUSrcB = 2'd0; c.ALUOp = aluop_e'(2'(ADD)); c.SCEn = 1'b1;
          q.push_back(c);
          for (int i = 0; i < sa; i++) begin
            c = '0; c.ALUSrcA = 2'd2; c.ALUOp = aluop_e'(2'(FUN)); c.SCEn = 1'b1;
            q.push_back(c);
          end
          c = '0; c.RegDst = 1'b1; c.RegWrite = 1'b1;
          q.push_back(c);
        end else if (fn == 6'h00 && full_sll) begin
          c = '0; c.ALUSrcA = 2'd1; c.ALUSrcB = 2'd0;
          c.ALUOp = (sa == 0) ? aluop_e'(2'(ADD)) : aluop_e'(2'(FUN));
          c.SCEn = (sa != 0);
          q.push_back(c);
          for (int i = 1; i < sa; i++) begin
            c = '0; c.ALUSrcA = 2'd2; c.ALUOp = aluop_e'(2'(FUN)); c.SCEn = 1'b1;
            q.push_back(c);
          end
          c = '0; c.RegDst = 1'b1; c.RegWrite = 1'b1;
          q.push_back(c);
        end else begin
          q.push_back(exp_row(2));
          if (v == V_FSM1 && ovf) q.push_back(exp_row(14));
          else q.push_back(exp_row(3));
        end
      end
      6'h0D: begin q.push_back(exp_row(4)); q.push_back(exp_row(5)); end
      6'h23: begin
        q.push_back(exp_row(6));
        q.push_back((v == V_MICRO2) ? exp_row_v2(7) : exp_row(7));
        q.push_back(exp_row(8));
      end
      6'h2B: begin q.push_back(exp_row(9)); q.push_back(exp_row(10)); end
      6'h04: q.push_back(exp_row(11));
      6'h02: q.push_back(exp_row(12));
      default: begin
        if (v == V_FSM1) q.push_back(exp_row(13));
        else if (v == V_SEQCNT) q.push_back('0);
      end
    endcase
    return q;
  endfunction

  // A random opcode: mostly the supported instructions, sometimes undefined
  function automatic logic [5:0] rand_op();
    int k = $urandom % 8;
    case (k)
      0: return 6'h00; 1: return 6'h0D; 2: return 6'h23; 3: return 6'h2B;
      4: return 6'h04; 5: return 6'h02; 6: return 6'h00;
      default: return 6'h3F - 6'($urandom % 8);
    endcase
  endfunction

  function automatic logic [5:0] rand_fn();
    int k = $urandom % 6;
    case (k)
      0: return 6'h20; 1: return 6'h22; 2: return 6'h24; 3: return 6'h25;
      4: return 6'h2A; default: return 6'h00;
    endcase
  endfunction

  // ------------------------------------------------------ demo program
  // Exercises every instruction, a taken and a not-taken branch, a loop, a
  // variable-length sll, an overflowing add and an undefined opcode. The
  // exception handler at 0x180 (the vector 0x8000_0180 modulo the memory
  // size) resumes after the add on its first entry and after the undefined
  // opcode on its second. The program ends in a jump to itself at HALT_PC.
  localparam logic [31:0] HALT_PC = 32'h70;

  function automatic void load_demo(mips_iss m);
    logic [31:0] p [$];
    p.push_back(enc_i(OP_ORI, 0, 1, 16'd5));             // 00 ori $1,$0,5
    p.push_back(enc_i(OP_ORI, 0, 2, 16'd3));             // 04 ori $2,$0,3
    p.push_back(enc_r(FN_ADD, 1, 2, 3));                 // 08 add $3,$1,$2
    p.push_back(enc_r(FN_SUB, 1, 2, 4));                 // 0c sub $4,$1,$2
    p.push_back(enc_r(FN_AND, 1, 2, 5));                 // 10 and $5,$1,$2
    p.push_back(enc_r(FN_OR,  1, 2, 6));                 // 14 or  $6,$1,$2
    p.push_back(enc_r(FN_SLT, 2, 1, 7));                 // 18 slt $7,$2,$1
    p.push_back(enc_i(OP_SW, 0, 3, 16'h100));            // 1c sw  $3,0x100($0)
    p.push_back(enc_i(OP_LW, 0, 8, 16'h100));            // 20 lw  $8,0x100($0)
    p.push_back(enc_i(OP_BEQ, 8, 3, 16'd1));             // 24 beq $8,$3,+1 (taken)
    p.push_back(enc_i(OP_ORI, 0, 9, 16'hBAD));           // 28 skipped
    p.push_back(enc_i(OP_BEQ, 1, 2, 16'd1));             // 2c beq $1,$2,+1 (not taken)
    p.push_back(enc_i(OP_ORI, 0, 10, 16'h77));           // 30 ori $10,$0,0x77
    p.push_back(enc_r(FN_SLL, 1, 0, 11, 5'd3));          // 34 sll $11,$1,3
    p.push_back(enc_r(FN_SLL, 2, 0, 12, 5'd0));          // 38 sll $12,$2,0
    p.push_back(enc_i(OP_ORI, 0, 13, 16'd0));            // 3c ori $13,$0,0
    p.push_back(enc_i(OP_ORI, 0, 14, 16'd4));            // 40 ori $14,$0,4
    p.push_back(enc_i(OP_ORI, 0, 15, 16'd1));            // 44 ori $15,$0,1
    p.push_back(enc_r(FN_ADD, 13, 1, 13));               // 48 loop: add $13,$13,$1
    p.push_back(enc_r(FN_SUB, 14, 15, 14));              // 4c sub $14,$14,$15
    p.push_back(enc_i(OP_BEQ, 14, 0, 16'd1));            // 50 beq $14,$0,+1
    p.push_back(enc_j(32'h48));                          // 54 j loop
    p.push_back(enc_i(OP_LW, 0, 16, 16'h104));           // 58 lw $16,0x104($0)
    p.push_back(enc_r(FN_ADD, 16, 16, 17));              // 5c add $17,$16,$16 (overflow)
    p.push_back(enc_i(OP_ORI, 0, 18, 16'h55));           // 60 ori $18,$0,0x55
    p.push_back(32'hFC00_0000);                          // 64 undefined opcode 0x3f
    p.push_back(enc_i(OP_ORI, 0, 19, 16'h66));           // 68 ori $19,$0,0x66
    p.push_back(enc_r(FN_SLL, 15, 0, 20, 5'd5));         // 6c sll $20,$15,5
    p.push_back(enc_j(HALT_PC));                         // 70 halt: j halt
    foreach (p[i]) m.mem[i] = p[i];
    m.mem[32'h100 >> 2] = 32'h0;
    m.mem[32'h104 >> 2] = 32'h7FFF_FFFF;
    // exception handler
    m.mem[(32'h180 >> 2) + 0] = enc_i(OP_BEQ, 22, 0, 16'd1); // beq $22,$0,first
    m.mem[(32'h180 >> 2) + 1] = enc_j(32'h68);               // j after undefined op
    m.mem[(32'h180 >> 2) + 2] = enc_i(OP_ORI, 0, 22, 16'd1); // first: ori $22,$0,1
    m.mem[(32'h180 >> 2) + 3] = enc_j(32'h60);               // j after add
  endfunction
endpackage
