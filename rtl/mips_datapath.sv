// Multi-cycle MIPS-lite datapath with exception registers and the SLL
// extension.
//
// One ALU and one unified memory are reused across the cycles of an
// instruction; the registers IR, MDR, A, B and ALUOut hold values from one
// cycle to the next. IR is written only when IRWrite is high; MDR, A, B and
// ALUOut are written on every clock edge, as in the classic multi-cycle
// datapath. The PC is written when PCWr is high, or when PCWrCd is high and
// the ALU's Zero flag is set (BEQ). The PC source mux has four inputs: ALU
// result (PC+4), ALUOut (branch target), the jump address
// {PC[31:28], IR[25:0], 00} and the exception vector 0x8000_0180. EPC takes
// the ALU result (PC-4 in an exception state) when EPCWrite is high, and
// Cause takes IntCause (0 undefined instruction, 1 overflow) when CauseWrite
// is high. For the variable-length SLL the ALU's A input mux has a third
// input, ALUOut, and the shift counter SCnt is loaded with IR[10:6].
//
// Interface: the control word `ctrl` comes from any of the control units;
// opcode, funct, zero, overflow and zero_c go back to them. Everything is
// registered on the rising clock edge with synchronous active-high reset
// (PC starts at RESET_PC). Mux codes follow the datapath figures; reset
// values and the register-file reset are this design's choices.
module mips_datapath
  import mips_pkg::*;
#(
  parameter int unsigned  MEM_WORDS = 1024,
  parameter logic [31:0]  RESET_PC  = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  output logic [5:0]  opcode,
  output logic [5:0]  funct,
  output logic        zero,
  output logic        overflow,
  output logic        zero_c,
  output logic [31:0] pc,
  output logic [31:0] ir,
  output logic [31:0] epc,
  output logic [31:0] cause
);
  logic [31:0] mdr, a_q, b_q, alu_out;
  logic [31:0] mem_addr, mem_rdata;
  logic [31:0] rd1, rd2, wdata;
  logic [4:0]  waddr;
  logic [31:0] ext_imm, src_a, src_b, alu_res, pc_next, jump_addr;
  logic        pc_we;
  alu_op_e     alu_op;
  logic [4:0]  sc_count;

  assign opcode = ir[31:26];
  assign funct  = ir[5:0];

  // Memory address and port
  assign mem_addr = ctrl.IorD ? alu_out : pc;

  unified_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk       (clk),
    .addr      (mem_addr),
    .mem_read  (ctrl.MemRead),
    .mem_write (ctrl.MemWrite),
    .wdata     (b_q),
    .rdata     (mem_rdata)
  );

  // Register file
  assign waddr = ctrl.RegDst   ? ir[15:11] : ir[20:16];
  assign wdata = ctrl.MemtoReg ? mdr       : alu_out;

  regfile u_rf (
    .clk (clk),
    .rst (rst),
    .ra1 (ir[25:21]),
    .ra2 (ir[20:16]),
    .rd1 (rd1),
    .rd2 (rd2),
    .we  (ctrl.RegWrite),
    .wa  (waddr),
    .wd  (wdata)
  );

  // Immediate extension and ALU operand muxes
  assign ext_imm = ctrl.ExtOp ? {{16{ir[15]}}, ir[15:0]} : {16'h0, ir[15:0]};

  always_comb begin
    unique case (ctrl.ALUSrcA)
      2'd0:    src_a = pc;
      2'd1:    src_a = a_q;
      default: src_a = alu_out;
    endcase
    unique case (ctrl.ALUSrcB)
      2'd0:    src_b = b_q;
      2'd1:    src_b = 32'd4;
      2'd2:    src_b = ext_imm;
      default: src_b = {ext_imm[29:0], 2'b00};
    endcase
  end

  alu_control u_aluctl (
    .aluop (ctrl.ALUOp),
    .funct (funct),
    .op    (alu_op)
  );

  alu u_alu (
    .a        (src_a),
    .b        (src_b),
    .op       (alu_op),
    .result   (alu_res),
    .zero     (zero),
    .overflow (overflow)
  );

  // PC source mux and write enable
  assign jump_addr = {pc[31:28], ir[25:0], 2'b00};

  always_comb begin
    unique case (ctrl.PCSrc)
      2'd0:    pc_next = alu_res;
      2'd1:    pc_next = alu_out;
      2'd2:    pc_next = jump_addr;
      default: pc_next = EXC_VECTOR;
    endcase
  end

  assign pc_we = ctrl.PCWr | (ctrl.PCWrCd & zero);

  // Shift counter for SLL
  shift_counter #(.W(5)) u_scnt (
    .clk      (clk),
    .rst      (rst),
    .sc_write (ctrl.SCWrite),
    .sc_en    (ctrl.SCEn),
    .sa       (ir[10:6]),
    .count    (sc_count),
    .zero_c   (zero_c)
  );

  // State registers
  always_ff @(posedge clk) begin
    if (rst) begin
      pc      <= RESET_PC;
      ir      <= '0;
      mdr     <= '0;
      a_q     <= '0;
      b_q     <= '0;
      alu_out <= '0;
      epc     <= '0;
      cause   <= '0;
    end else begin
      if (pc_we)           pc    <= pc_next;
      if (ctrl.IRWrite)    ir    <= mem_rdata;
      if (ctrl.EPCWrite)   epc   <= alu_res;
      if (ctrl.CauseWrite) cause <= {31'h0, ctrl.IntCause};
      mdr     <= mem_rdata;
      a_q     <= rd1;
      b_q     <= rd2;
      alu_out <= alu_res;
    end
  end
endmodule
