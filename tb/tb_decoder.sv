// tb_decoder: self-checking test of decoder. Random instances of every
// implemented instruction (register fields and immediates random) are
// encoded with the testbench assembler, and the decoded fields - registers
// read and written, immediate and its extension, ALU or shift operation,
// memory access kind, branch and jump flags - are compared with values
// written down per instruction. Unimplemented opcodes must decode as not
// legal and write nothing.
module tb_decoder;
  import dlx_pkg::*;
  import tb_dlx_pkg::r_type, tb_dlx_pkg::i_type, tb_dlx_pkg::j_type;
  logic [31:0] instr;
  ctrl_t       c;
  int checks = 0, failures = 0;

  decoder u_dut (.instr, .ctrl(c));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s (instr %h)", what, instr); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rfn [19] = '{'h20, 'h21, 'h22, 'h23, 'h24, 'h25, 'h26, 'h28, 'h29, 'h2A, 'h2B, 'h2C, 'h2D,
                     'h10, 'h11, 'h12, 'h13, 'h14, 'h15};
    alu_op_e rop [19] = '{ALU_ADD, ALU_ADD, ALU_SUB, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SEQ,
                          ALU_SNE, ALU_SLT, ALU_SGT, ALU_SLE, ALU_SGE, ALU_SEQ, ALU_SNE, ALU_SLTU,
                          ALU_SGTU, ALU_SLEU, ALU_SGEU};
    int iop [19] = '{'h08, 'h09, 'h0A, 'h0B, 'h0C, 'h0D, 'h0E, 'h18, 'h19, 'h1A, 'h1B, 'h1C, 'h1D,
                     'h30, 'h31, 'h32, 'h33, 'h34, 'h35};
    alu_op_e iaop [19] = '{ALU_ADD, ALU_ADD, ALU_SUB, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SEQ,
                           ALU_SNE, ALU_SLT, ALU_SGT, ALU_SLE, ALU_SGE, ALU_SEQ, ALU_SNE, ALU_SLTU,
                           ALU_SGTU, ALU_SLEU, ALU_SGEU};
    bit isx [19] = '{1, 0, 1, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0, 0};
    int sfn [6] = '{'h04, 'h06, 'h07, 'h00, 'h02, 'h03};
    shift_op_e sop [6] = '{SH_SLL, SH_SRL, SH_SRA, SH_SLL, SH_SRL, SH_SRA};
    for (int n = 0; n < 40; n++) begin
      int r1, r2, rd, imm, sh;
      logic [31:0] sx, zx;
      r1 = int'($urandom % 32); r2 = int'($urandom % 32); rd = int'($urandom % 32);
      imm = int'($urandom % 65536); sh = int'($urandom % 32);
      sx = {{16{imm[15]}}, imm[15:0]}; zx = {16'b0, imm[15:0]};
      for (int k = 0; k < 19; k++) begin
        instr = r_type(rfn[k], r1, r2, rd); #1;
        check(c.legal && c.rs1 == 5'(r1) && c.rs2 == 5'(r2) && c.rd == 5'(rd) && c.rs1_used && c.rs2_used, "R fields");
        check(c.alu_op == rop[k] && !c.use_imm && !c.is_shift && c.reg_write == (rd != 0), $sformatf("R op %h", rfn[k]));
        instr = i_type(iop[k], r1, rd, imm); #1;
        check(c.legal && c.rs1 == 5'(r1) && c.rd == 5'(rd) && c.rs1_used && !c.rs2_used && c.use_imm, "I fields");
        check(c.alu_op == iaop[k] && c.imm == (isx[k] ? sx : zx) && c.reg_write == (rd != 0), $sformatf("I op %h", iop[k]));
      end
      for (int k = 0; k < 6; k++) begin
        instr = r_type(sfn[k], r1, r2, rd, sh); #1;
        check(c.legal && c.is_shift && c.shift_op == sop[k] && c.rd == 5'(rd), "shift");
        check(k < 3 ? (c.rs2_used && !c.use_imm) : (!c.rs2_used && c.use_imm && c.imm == 32'(sh)), "shift operand");
      end
      instr = i_type('h0F, r1, rd, imm); #1;
      check(c.legal && c.alu_op == ALU_PASSB && c.imm == {imm[15:0], 16'b0} && !c.rs1_used && c.reg_write == (rd != 0), "LHI");
      instr = i_type('h23, r1, rd, imm); #1;
      check(c.is_load && c.mem_size == MEM_WORD && c.imm == sx && c.alu_op == ALU_ADD && c.rd == 5'(rd), "LW");
      instr = i_type('h24, r1, rd, imm); #1;
      check(c.is_load && c.mem_size == MEM_BYTE && c.load_unsigned, "LBU");
      instr = i_type('h21, r1, rd, imm); #1;
      check(c.is_load && c.mem_size == MEM_HALF && !c.load_unsigned, "LH");
      instr = i_type('h29, r1, rd, imm); #1;
      check(c.is_store && c.mem_size == MEM_HALF && c.rs2 == 5'(rd) && c.rs2_used && !c.reg_write && c.imm == sx, "SH");
      instr = i_type('h05, r1, rd, imm); #1;
      check(c.is_branch && c.branch_nez && c.rs1_used && !c.reg_write && c.imm == sx, "BNEZ");
      instr = i_type('h04, r1, rd, imm); #1;
      check(c.is_branch && !c.branch_nez, "BEQZ");
      instr = j_type('h03, imm * 1024 + sh); #1;
      check(c.is_jump && c.link && c.reg_write && c.rd == 5'd31 && !c.jump_reg &&
            c.imm == {{6{instr[25]}}, instr[25:0]}, "JAL");
      instr = j_type('h02, imm); #1;
      check(c.is_jump && !c.link && !c.reg_write, "J");
      instr = i_type('h13, r1, 0, 0); #1;
      check(c.is_jump && c.jump_reg && c.link && c.rs1 == 5'(r1) && c.rs1_used && c.rd == 5'd31, "JALR");
      instr = i_type('h12, r1, 0, 0); #1;
      check(c.is_jump && c.jump_reg && !c.link && !c.reg_write, "JR");
      instr = r_type('h18, r1, r2, rd); #1;       // MULT: not implemented
      check(!c.legal && !c.reg_write, "MULT");
      instr = i_type('h11, r1, rd, imm); #1;      // TRAP: not implemented
      check(!c.legal && !c.reg_write && !c.is_jump, "TRAP");
      instr = i_type('h01, r1, rd, imm); #1;      // floating point group
      check(!c.legal && !c.reg_write, "FP");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
