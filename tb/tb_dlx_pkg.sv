// tb_dlx_pkg: program generator and instruction-level reference model used
// by the DLX testbenches.
//
// gen_program() writes a program into prog[]: a fixed prologue that forces
// every pipeline mechanism (long shift, load followed by a user, result and
// write-back bypass, taken and untaken branches, register jumps), then a
// stream of random instructions of the implemented subset, then a jump to
// itself as the end marker. The mix of the random part is set by the caller
// in percent; with fixed_shift >= 0 every shift is an immediate shift by
// that amount. run_iss() executes the program instruction by instruction from
// the DLX definitions, written independently of the RTL, and records every
// register write and every store in queues, plus counts from which the
// cycle count of the pipeline is predicted:
//   cycles = executed + 4 (pipeline fill) + 2 per branch or jump
//            + 1 per load whose next instruction reads the loaded register
//            + per shift max(1, ceil(n*STEP/CYCLE)) - 1 with a linear shifter.
package tb_dlx_pkg;

  localparam int unsigned IMEM_WORDS = 2048;
  localparam int unsigned DMEM_WORDS = 256;
  localparam logic [31:0] DBASE      = 32'h0000_1000;
  localparam logic [31:0] HALT       = {6'h02, 26'h3FF_FFFC};   // J -4: jump to itself

  logic [31:0] prog  [IMEM_WORDS];
  logic [31:0] dinit [DMEM_WORDS];
  int unsigned plen;

  // reference state and traces
  logic [31:0] iregs [32];
  logic [31:0] idmem [DMEM_WORDS];
  logic [4:0]  exp_rd   [$];
  logic [31:0] exp_val  [$];
  logic [31:0] exp_pc   [$];
  logic [31:0] cur_pc;
  logic [31:0] exp_saddr[$];
  logic [31:0] exp_sdata[$];
  logic [3:0]  exp_sbe  [$];
  int unsigned n_exec, n_ctrl, n_taken, n_shift, n_long_shift, shift_extra, n_load_use;

  // ---------------- assembler ----------------
  function automatic logic [31:0] r_type(int fn, int rs1, int rs2, int rd, int sh = 0);
    return {6'h00, 5'(rs1), 5'(rs2), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] i_type(int op, int rs1, int rd, int imm);
    return {6'(op), 5'(rs1), 5'(rd), 16'(imm)};
  endfunction
  function automatic logic [31:0] j_type(int op, int off);
    return {6'(op), 26'(off)};
  endfunction
  function automatic void emit(logic [31:0] w);
    prog[plen] = w;
    plen++;
  endfunction

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  // data registers of the random stream
  function automatic int rreg();
    int r = rnd(0, 13);
    return (r == 13) ? 31 : r;
  endfunction
  function automatic int dreg();
    return rnd(1, 12);
  endfunction

  // pct: percent of random instructions that are {alu_r, alu_i, shift, load, store, branch, jump}
  function automatic void gen_program(int n_random, int pct_shift, int pct_branch,
                                      int pct_load, int pct_store, int max_shift = 31,
                                      int fixed_shift = -1);
    int k, sel;
    int alu_r_fn [] = '{'h20, 'h21, 'h22, 'h23, 'h24, 'h25, 'h26, 'h28, 'h29, 'h2A, 'h2B,
                         'h2C, 'h2D, 'h10, 'h11, 'h12, 'h13, 'h14, 'h15};
    int alu_i_op [] = '{'h08, 'h09, 'h0A, 'h0B, 'h0C, 'h0D, 'h0E, 'h18, 'h19, 'h1A, 'h1B,
                         'h1C, 'h1D, 'h30, 'h31, 'h32, 'h33, 'h34, 'h35, 'h0F};
    int ld_op [] = '{'h20, 'h21, 'h23, 'h24, 'h25};
    int st_op [] = '{'h28, 'h29, 'h2B};
    plen = 0;
    for (int i = 0; i < IMEM_WORDS; i++) prog[i] = HALT;
    for (int i = 0; i < DMEM_WORDS; i++) dinit[i] = $urandom;

    // prologue: base register and data registers
    emit(i_type('h08, 0, 20, int'(DBASE)));              // ADDI r20, r0, DBASE
    for (int r = 1; r <= 12; r++) begin
      emit(i_type('h0F, 0, r, int'($urandom)));           // LHI
      emit(i_type('h0D, r, r, int'($urandom)));           // ORI
    end
    emit(r_type('h00, 1, 0, 2, 31));                      // SLLI r2, r1, 31   (longest shift)
    if (fixed_shift >= 0) emit(r_type('h03, 2, 0, 3, fixed_shift)); // SRAI r3, r2, fixed
    else emit(r_type('h07, 2, 1, 3));                     // SRA  r3, r2, r1
    emit(i_type('h23, 20, 4, 8));                         // LW   r4, 8(r20)
    emit(r_type('h20, 4, 4, 5));                          // ADD  r5, r4, r4   (load interlock)
    emit(r_type('h22, 5, 4, 6));                          // SUB  r6, r5, r4   (bypass both)
    emit(i_type('h04, 0, 0, 4));                          // BEQZ r0, +4       (taken)
    emit(i_type('h08, 0, 7, 99));                         //   skipped
    emit(i_type('h05, 0, 0, 4));                          // BNEZ r0, +4       (not taken)
    emit(i_type('h08, 0, 7, 55));                         // ADDI r7, r0, 55
    emit(i_type('h08, 0, 13, int'((plen + 3) * 4)));      // ADDI r13, r0, target
    emit(i_type('h13, 13, 0, 0));                         // JALR r13
    emit(i_type('h08, 0, 8, 77));                         //   skipped
    emit(i_type('h2B, 20, 31, 12));                       // SW   r31, 12(r20)
    emit(j_type('h03, 4));                                // JAL  +4
    emit(i_type('h08, 0, 8, 78));                         //   skipped
    emit(i_type('h23, 20, 9, 12));                        // LW   r9, 12(r20)
    emit(i_type('h04, 9, 0, 0));                          // BEQZ r9 right after the load

    for (int n = 0; n < n_random; n++) begin
      sel = rnd(0, 99);
      if (sel < pct_shift) begin
        k = (fixed_shift >= 0) ? rnd(3, 5) : rnd(0, 5);
        if (k < 3) emit(r_type(k == 0 ? 'h04 : (k == 1 ? 'h06 : 'h07), rreg(), rreg(), dreg()));
        else       emit(r_type(k == 3 ? 'h00 : (k == 4 ? 'h02 : 'h03), rreg(), 0, dreg(),
                               fixed_shift >= 0 ? fixed_shift : rnd(0, max_shift)));
      end else if (sel < pct_shift + pct_branch) begin
        k = rnd(0, 9);
        if (k < 7) emit(i_type(k < 4 ? 'h04 : 'h05, rreg(), 0, 4 * rnd(0, 3)));
        else if (k < 9) emit(j_type(k == 7 ? 'h02 : 'h03, 4 * rnd(0, 2)));
        else begin
          emit(i_type('h08, 0, 13, int'((plen + 2 + rnd(0, 2)) * 4)));
          emit(i_type(rnd(0, 1) ? 'h12 : 'h13, 13, 0, 0));
        end
      end else if (sel < pct_shift + pct_branch + pct_load) begin
        emit(i_type(ld_op[rnd(0, ld_op.size() - 1)], 20, rnd(0, 12), 4 * rnd(0, DMEM_WORDS - 1) + rnd(0, 3) * 0));
        // follow loads often with a direct user
        if (rnd(0, 1) == 1) emit(r_type('h20, prog[plen-1][20:16], rreg(), dreg()));
      end else if (sel < pct_shift + pct_branch + pct_load + pct_store) begin
        k = st_op[rnd(0, 2)];
        emit(i_type(k, 20, rreg(), 4 * rnd(0, DMEM_WORDS - 1) + (k == 'h28 ? rnd(0, 3) : (k == 'h29 ? 2 * rnd(0, 1) : 0))));
      end else if (sel < 55 + (100 - 55) / 2) begin
        emit(r_type(alu_r_fn[rnd(0, alu_r_fn.size() - 1)], rreg(), rreg(), rnd(0, 12)));
      end else begin
        emit(i_type(alu_i_op[rnd(0, alu_i_op.size() - 1)], rreg(), dreg(), int'($urandom)));
      end
    end
    // landing pad for forward skips, then the end marker
    for (int i = 0; i < 4; i++) emit(r_type('h20, 0, 0, 0));
    emit(HALT);
  endfunction

  // ---------------- reference model ----------------
  function automatic logic [31:0] sx16(logic [31:0] w); return {{16{w[15]}}, w[15:0]}; endfunction
  function automatic logic [31:0] zx16(logic [31:0] w); return {16'b0, w[15:0]}; endfunction

  function automatic int shift_cycles(int n, bit linear, int cycle_ns, int step_ns);
    int c;
    if (!linear) return 1;
    c = (n * step_ns + cycle_ns - 1) / cycle_ns;
    return (c < 1) ? 1 : c;
  endfunction

  // registers the instruction reads (bit mask)
  function automatic logic [31:0] reads(logic [31:0] w);
    logic [5:0] op = w[31:26];
    logic [31:0] m = '0;
    if (op == 6'h00) begin
      m[w[25:21]] = 1'b1;
      if (!(w[5:0] inside {6'h00, 6'h02, 6'h03})) m[w[20:16]] = 1'b1;
    end else if (op inside {6'h02, 6'h03, 6'h0F}) begin
    end else begin
      m[w[25:21]] = 1'b1;
      if (op inside {6'h28, 6'h29, 6'h2B}) m[w[20:16]] = 1'b1;
    end
    m[0] = 1'b0;
    return m;
  endfunction

  function automatic void wr(int rd, logic [31:0] v);
    if (rd != 0) begin
      iregs[rd] = v;
      exp_rd.push_back(5'(rd));
      exp_val.push_back(v);
      exp_pc.push_back(cur_pc);
    end
  endfunction

  function automatic void run_iss(bit linear, int cycle_ns, int step_ns);
    logic [31:0] pc, w, a, b, npc, addr, word, v;
    logic [5:0]  op, fn;
    int rs1, rs2, rd, sh, idx;
    int pending_load_rd;
    exp_rd.delete(); exp_val.delete(); exp_pc.delete();
    exp_saddr.delete(); exp_sdata.delete(); exp_sbe.delete();
    for (int i = 0; i < 32; i++) iregs[i] = '0;
    for (int i = 0; i < DMEM_WORDS; i++) idmem[i] = dinit[i];
    n_exec = 0; n_ctrl = 0; n_taken = 0; n_shift = 0; n_long_shift = 0;
    shift_extra = 0; n_load_use = 0;
    pending_load_rd = 0;
    pc = 0;
    forever begin
      w = prog[pc[12:2]];
      cur_pc = pc;
      if (w == HALT) break;
      if (pending_load_rd != 0 && reads(w)[pending_load_rd]) n_load_use++;
      pending_load_rd = 0;
      n_exec++;
      op  = w[31:26]; fn = w[5:0];
      rs1 = int'(w[25:21]); rs2 = int'(w[20:16]);
      a   = iregs[rs1]; b = iregs[rs2];
      npc = pc + 4;
      if (op == 6'h00) begin
        rd = int'(w[15:11]);
        sh = -1;
        case (fn)
          6'h20, 6'h21: wr(rd, a + b);
          6'h22, 6'h23: wr(rd, a - b);
          6'h24: wr(rd, a & b);
          6'h25: wr(rd, a | b);
          6'h26: wr(rd, a ^ b);
          6'h28, 6'h10: wr(rd, 32'(a == b));
          6'h29, 6'h11: wr(rd, 32'(a != b));
          6'h2A: wr(rd, 32'($signed(a) <  $signed(b)));
          6'h2B: wr(rd, 32'($signed(a) >  $signed(b)));
          6'h2C: wr(rd, 32'($signed(a) <= $signed(b)));
          6'h2D: wr(rd, 32'($signed(a) >= $signed(b)));
          6'h12: wr(rd, 32'(a <  b));
          6'h13: wr(rd, 32'(a >  b));
          6'h14: wr(rd, 32'(a <= b));
          6'h15: wr(rd, 32'(a >= b));
          6'h04: begin sh = int'(b[4:0]);  wr(rd, a << sh); end
          6'h06: begin sh = int'(b[4:0]);  wr(rd, a >> sh); end
          6'h07: begin sh = int'(b[4:0]);  wr(rd, 32'($signed(a) >>> sh)); end
          6'h00: begin sh = int'(w[10:6]); wr(rd, a << sh); end
          6'h02: begin sh = int'(w[10:6]); wr(rd, a >> sh); end
          6'h03: begin sh = int'(w[10:6]); wr(rd, 32'($signed(a) >>> sh)); end
          default: ;
        endcase
        if (sh >= 0) begin
          n_shift++;
          if (shift_cycles(sh, linear, cycle_ns, step_ns) > 1) n_long_shift++;
          shift_extra += shift_cycles(sh, linear, cycle_ns, step_ns) - 1;
        end
      end else begin
        rd = rs2;
        case (op)
          6'h08: wr(rd, a + sx16(w));
          6'h09: wr(rd, a + zx16(w));
          6'h0A: wr(rd, a - sx16(w));
          6'h0B: wr(rd, a - zx16(w));
          6'h0C: wr(rd, a & zx16(w));
          6'h0D: wr(rd, a | zx16(w));
          6'h0E: wr(rd, a ^ zx16(w));
          6'h0F: wr(rd, {w[15:0], 16'b0});
          6'h18: wr(rd, 32'(a == sx16(w)));
          6'h19: wr(rd, 32'(a != sx16(w)));
          6'h1A: wr(rd, 32'($signed(a) <  $signed(sx16(w))));
          6'h1B: wr(rd, 32'($signed(a) >  $signed(sx16(w))));
          6'h1C: wr(rd, 32'($signed(a) <= $signed(sx16(w))));
          6'h1D: wr(rd, 32'($signed(a) >= $signed(sx16(w))));
          6'h30: wr(rd, 32'(a == zx16(w)));
          6'h31: wr(rd, 32'(a != zx16(w)));
          6'h32: wr(rd, 32'(a <  zx16(w)));
          6'h33: wr(rd, 32'(a >  zx16(w)));
          6'h34: wr(rd, 32'(a <= zx16(w)));
          6'h35: wr(rd, 32'(a >= zx16(w)));
          6'h20, 6'h21, 6'h23, 6'h24, 6'h25: begin
            addr = a + sx16(w);
            idx  = int'((addr - DBASE) >> 2) % DMEM_WORDS;
            word = idmem[idx];
            case (op)
              6'h20: v = {{24{word[31 - 8*addr[1:0]]}}, word[31 - 8*addr[1:0] -: 8]};
              6'h24: v = {24'b0, word[31 - 8*addr[1:0] -: 8]};
              6'h21: v = addr[1] ? sx16(word) : sx16(word >> 16);
              6'h25: v = addr[1] ? zx16(word) : zx16(word >> 16);
              default: v = word;
            endcase
            wr(rd, v);
            pending_load_rd = rd;
          end
          6'h28, 6'h29, 6'h2B: begin
            logic [3:0] be;
            logic [31:0] d;
            addr = a + sx16(w);
            idx  = int'((addr - DBASE) >> 2) % DMEM_WORDS;
            case (op)
              6'h28: begin be = 4'b1000 >> addr[1:0]; d = {4{b[7:0]}}; end
              6'h29: begin be = addr[1] ? 4'b0011 : 4'b1100; d = {2{b[15:0]}}; end
              default: begin be = 4'b1111; d = b; end
            endcase
            for (int i = 0; i < 4; i++) if (be[i]) idmem[idx][8*i +: 8] = d[8*i +: 8];
            exp_saddr.push_back(addr);
            exp_sdata.push_back(d);
            exp_sbe.push_back(be);
          end
          6'h04, 6'h05: begin
            n_ctrl++;
            if ((op == 6'h04) == (a == 0)) begin npc = pc + 4 + sx16(w); n_taken++; end
          end
          6'h02, 6'h03: begin
            n_ctrl++; n_taken++;
            if (op == 6'h03) wr(31, pc + 4);
            npc = pc + 4 + {{6{w[25]}}, w[25:0]};
          end
          6'h12, 6'h13: begin
            n_ctrl++; n_taken++;
            if (op == 6'h13) wr(31, pc + 4);
            npc = a;
          end
          default: ;
        endcase
      end
      pc = npc;
    end
  endfunction

  function automatic int predicted_cycles();
    return int'(n_exec + 4 + 2 * n_ctrl + n_load_use + shift_extra);
  endfunction

endpackage
