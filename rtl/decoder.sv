// decoder: instruction decoder for the implemented DLX integer subset.
//
// Turns one 32-bit instruction into the control word (dlx_pkg::ctrl_t) that
// steers the register file, bypass comparators, execute unit, memory
// interface and PC unit. One copy of this decoder sits behind each stage of
// the instruction register chain, so every stage decodes its own copy of the
// instruction. Purely combinational.
//
// Field positions follow the three DLX formats: R-type
// opcode[31:26] rs1[25:21] rs2[20:16] rd[15:11] function[5:0]; I-type
// opcode rs1 rd[20:16] immediate[15:0]; J-type opcode offset[25:0]. For
// stores the I-type rd field names the register to be stored. Shift
// immediates are SPECIAL-group instructions whose amount this design takes
// from bits 10:6. Sign extension is used for ADDI, SUBI, the signed set
// immediates, loads, stores and branches; ANDI, ORI, XORI and the unsigned
// immediates are zero extended (own choice). Unimplemented instructions
// (multiply/divide, floating point, special-register moves, traps) decode
// to a no-operation with legal = 0.
module decoder
  import dlx_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);

  logic [5:0]  opcode, func;
  logic [31:0] sext16, zext16, sext26;

  assign opcode = instr[31:26];
  assign func   = instr[5:0];
  assign sext16 = {{16{instr[15]}}, instr[15:0]};
  assign zext16 = {16'b0, instr[15:0]};
  assign sext26 = {{6{instr[25]}}, instr[25:0]};

  always_comb begin
    ctrl          = '0;
    ctrl.alu_op   = ALU_ADD;
    ctrl.shift_op = SH_SLL;
    ctrl.mem_size = MEM_WORD;
    ctrl.rs1      = instr[25:21];
    ctrl.rs2      = instr[20:16];
    ctrl.rd       = instr[20:16];

    unique case (opcode)
      OP_SPECIAL: begin
        ctrl.rd       = instr[15:11];
        ctrl.rs1_used = 1'b1;
        ctrl.rs2_used = 1'b1;
        ctrl.legal    = 1'b1;
        unique case (func)
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_SEQ, FN_SEQU: ctrl.alu_op = ALU_SEQ;
          FN_SNE, FN_SNEU: ctrl.alu_op = ALU_SNE;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SGT:  ctrl.alu_op = ALU_SGT;
          FN_SLE:  ctrl.alu_op = ALU_SLE;
          FN_SGE:  ctrl.alu_op = ALU_SGE;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          FN_SGTU: ctrl.alu_op = ALU_SGTU;
          FN_SLEU: ctrl.alu_op = ALU_SLEU;
          FN_SGEU: ctrl.alu_op = ALU_SGEU;
          FN_SLL, FN_SRL, FN_SRA: begin
            ctrl.is_shift = 1'b1;
            ctrl.shift_op = (func == FN_SLL) ? SH_SLL :
                            (func == FN_SRL) ? SH_SRL : SH_SRA;
          end
          FN_SLLI, FN_SRLI, FN_SRAI: begin
            ctrl.is_shift = 1'b1;
            ctrl.rs2_used = 1'b0;
            ctrl.use_imm  = 1'b1;
            ctrl.imm      = {27'b0, instr[10:6]};
            ctrl.shift_op = (func == FN_SLLI) ? SH_SLL :
                            (func == FN_SRLI) ? SH_SRL : SH_SRA;
          end
          default: begin
            ctrl.legal    = 1'b0;
            ctrl.rs1_used = 1'b0;
            ctrl.rs2_used = 1'b0;
          end
        endcase
        ctrl.reg_write = ctrl.legal;
      end

      OP_ADDI, OP_ADDUI, OP_SUBI, OP_SUBUI, OP_ANDI, OP_ORI, OP_XORI,
      OP_SEQI, OP_SNEI, OP_SLTI, OP_SGTI, OP_SLEI, OP_SGEI,
      OP_SEQUI, OP_SNEUI, OP_SLTUI, OP_SGTUI, OP_SLEUI, OP_SGEUI: begin
        ctrl.legal     = 1'b1;
        ctrl.rs1_used  = 1'b1;
        ctrl.use_imm   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.imm       = sext16;
        unique case (opcode)
          OP_ADDI:  ctrl.alu_op = ALU_ADD;
          OP_ADDUI: begin ctrl.alu_op = ALU_ADD;  ctrl.imm = zext16; end
          OP_SUBI:  ctrl.alu_op = ALU_SUB;
          OP_SUBUI: begin ctrl.alu_op = ALU_SUB;  ctrl.imm = zext16; end
          OP_ANDI:  begin ctrl.alu_op = ALU_AND;  ctrl.imm = zext16; end
          OP_ORI:   begin ctrl.alu_op = ALU_OR;   ctrl.imm = zext16; end
          OP_XORI:  begin ctrl.alu_op = ALU_XOR;  ctrl.imm = zext16; end
          OP_SEQI:  ctrl.alu_op = ALU_SEQ;
          OP_SNEI:  ctrl.alu_op = ALU_SNE;
          OP_SLTI:  ctrl.alu_op = ALU_SLT;
          OP_SGTI:  ctrl.alu_op = ALU_SGT;
          OP_SLEI:  ctrl.alu_op = ALU_SLE;
          OP_SGEI:  ctrl.alu_op = ALU_SGE;
          OP_SEQUI: begin ctrl.alu_op = ALU_SEQ;  ctrl.imm = zext16; end
          OP_SNEUI: begin ctrl.alu_op = ALU_SNE;  ctrl.imm = zext16; end
          OP_SLTUI: begin ctrl.alu_op = ALU_SLTU; ctrl.imm = zext16; end
          OP_SGTUI: begin ctrl.alu_op = ALU_SGTU; ctrl.imm = zext16; end
          OP_SLEUI: begin ctrl.alu_op = ALU_SLEU; ctrl.imm = zext16; end
          default:  begin ctrl.alu_op = ALU_SGEU; ctrl.imm = zext16; end
        endcase
      end

      OP_LHI: begin
        ctrl.legal     = 1'b1;
        ctrl.use_imm   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.imm       = {instr[15:0], 16'b0};
        ctrl.alu_op    = ALU_PASSB;
      end

      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        ctrl.legal         = 1'b1;
        ctrl.rs1_used      = 1'b1;
        ctrl.use_imm       = 1'b1;
        ctrl.reg_write     = 1'b1;
        ctrl.imm           = sext16;
        ctrl.is_load       = 1'b1;
        ctrl.mem_size      = (opcode == OP_LW) ? MEM_WORD :
                             (opcode == OP_LH || opcode == OP_LHU) ? MEM_HALF : MEM_BYTE;
        ctrl.load_unsigned = (opcode == OP_LBU || opcode == OP_LHU);
      end

      OP_SB, OP_SH, OP_SW: begin
        ctrl.legal    = 1'b1;
        ctrl.rs1_used = 1'b1;
        ctrl.rs2_used = 1'b1;
        ctrl.use_imm  = 1'b1;
        ctrl.imm      = sext16;
        ctrl.is_store = 1'b1;
        ctrl.mem_size = (opcode == OP_SW) ? MEM_WORD :
                        (opcode == OP_SH) ? MEM_HALF : MEM_BYTE;
      end

      OP_BEQZ, OP_BNEZ: begin
        ctrl.legal      = 1'b1;
        ctrl.rs1_used   = 1'b1;
        ctrl.imm        = sext16;
        ctrl.is_branch  = 1'b1;
        ctrl.branch_nez = (opcode == OP_BNEZ);
      end

      OP_J, OP_JAL: begin
        ctrl.legal     = 1'b1;
        ctrl.imm       = sext26;
        ctrl.is_jump   = 1'b1;
        ctrl.link      = (opcode == OP_JAL);
        ctrl.reg_write = (opcode == OP_JAL);
        ctrl.rd        = LINK_REG;
      end

      OP_JR, OP_JALR: begin
        ctrl.legal     = 1'b1;
        ctrl.rs1_used  = 1'b1;
        ctrl.is_jump   = 1'b1;
        ctrl.jump_reg  = 1'b1;
        ctrl.link      = (opcode == OP_JALR);
        ctrl.reg_write = (opcode == OP_JALR);
        ctrl.rd        = LINK_REG;
      end

      default: ;
    endcase

    // Writes to register 0 are no writes at all
    if (ctrl.rd == 5'd0) ctrl.reg_write = 1'b0;
  end

endmodule
