// dlx_top: integer datapath of a five-stage pipelined DLX processor whose
// ALU adder and shifter are chosen to match the instruction mix.
//
// Pipeline: IF (fetch at fetch_pc), RF (decode, register read), ALU (bypass
// selection, ALU or shifter, branch resolution), MEM (data memory access)
// and WB (register write). The default configuration is the balanced design
// point: a fast 32-bit parallel prefix adder in the ALU and PC unit, paired
// with a small linear shifter that needs several cycles for long shifts
// (33 ns machine cycle, 10 ns per shift step). ADDER_KIND, SHIFTER_KIND and
// CYCLE_NS select the other design points: ripple carry adder with barrel
// shifter (93 ns), or four cascaded 8-bit parallel prefix adders with the
// linear shifter (66 ns). CYCLE_NS only sets how many linear-shift steps fit
// in a cycle; it does not change the logic otherwise.
//
// Instruction and data memories are outside: imem_rdata must return the word
// at imem_addr in the same cycle (no instruction cache is modelled), and
// dmem_rdata the word at dmem_addr in the same cycle. dmem_addr, dmem_wdata,
// dmem_be (be[3] = byte at offset 0, big endian) and dmem_we are valid while
// a store is in the MEM stage and are written at the clock edge.
//
// Hazards: results are bypassed from the MEM and WB stages into the ALU
// stage and written through the register file; a load followed at once by
// a user of its value costs one bubble; a branch or jump costs two bubbles
// (no delay slot, nothing after it is executed unless it falls through);
// a linear shift holds the pipeline until it finishes. Not implemented:
// multiply/divide, floating point, traps, interrupts and overflow traps,
// special registers.
//
// The wb_* outputs show each register write as it happens; the ev_* outputs
// pulse once per cycle of each event, for performance counting; shift_busy
// is high while a linear shift runs on past its first cycle.
module dlx_top
  import dlx_pkg::*;
#(
  parameter adder_kind_e   ADDER_KIND    = ADDER_PPA,
  parameter shifter_kind_e SHIFTER_KIND  = SHIFTER_LINEAR,
  parameter int unsigned   CYCLE_NS      = 33,
  parameter int unsigned   SHIFT_STEP_NS = 10,
  parameter logic [31:0]   RESET_PC      = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // Instruction fetch
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  // Data memory pads
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic [3:0]  dmem_be,
  output logic        dmem_we,
  output logic        dmem_re,
  input  logic [31:0] dmem_rdata,
  // Register write-back
  output logic        wb_we,
  output logic [4:0]  wb_rd,
  output logic [31:0] wb_data,
  // Events
  output logic        ev_retire,
  output logic        ev_shift_stall,
  output logic        ev_load_stall,
  output logic        ev_branch_stall,
  output logic        ev_bypass_result,
  output logic        ev_bypass_mdr,
  output logic        ev_overflow,
  output logic        ev_illegal,
  output logic        shift_busy
);

  // ---------------- control ----------------
  logic  rf_valid, alu_valid, alu_first, mem_valid;
  ctrl_t rf_ctrl, alu_ctrl, mem_ctrl;
  logic  hold_alu, hold_rf, bubble_alu, fetch_en, fetch_valid, redirect;
  logic  ex_done, a_zero, overflow, shift_go;

  instr_register u_ir (
    .clk, .rst_n,
    .fetch_instr(imem_rdata), .fetch_valid,
    .hold_rf, .hold_alu, .bubble_alu,
    .rf_valid, .rf_ctrl, .alu_valid, .alu_first, .alu_ctrl, .mem_valid, .mem_ctrl
  );

  pipeline_control u_ctl (
    .rf_valid, .rf_ctrl, .alu_valid, .alu_ctrl, .ex_done, .a_zero,
    .hold_alu, .hold_rf, .bubble_alu, .fetch_en, .fetch_valid, .redirect,
    .ev_shift_stall, .ev_load_stall, .ev_branch_stall
  );

  // ---------------- RF stage ----------------
  logic [31:0] rf_rdata1, rf_rdata2;
  logic [31:0] opa_q, opb_q;      // values read from the array, held for the ALU stage

  register_file u_rf (
    .clk, .rst_n,
    .raddr1(rf_ctrl.rs1), .rdata1(rf_rdata1),
    .raddr2(rf_ctrl.rs2), .rdata2(rf_rdata2),
    .we(wb_we), .waddr(wb_rd), .wdata(wb_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opa_q <= '0;
      opb_q <= '0;
    end else if (!hold_alu) begin
      opa_q <= rf_rdata1;
      opb_q <= rf_rdata2;
    end
  end

  // ---------------- ALU stage ----------------
  logic [1:0]  sel1, sel2;
  logic [31:0] res_q;             // result bypass register (ALU -> MEM)
  logic [31:0] st_q;              // output memory data register
  logic [31:0] src1, src2, opb, result, link_addr;

  bypass_unit u_byp (
    .rs1(alu_ctrl.rs1), .rs1_used(alu_ctrl.rs1_used),
    .rs2(alu_ctrl.rs2), .rs2_used(alu_ctrl.rs2_used),
    .mem_valid, .mem_ctrl, .wb_we, .wb_rd,
    .sel1, .sel2
  );

  always_comb begin
    unique case (sel1)
      2'd1:    src1 = res_q;
      2'd2:    src1 = wb_data;
      default: src1 = opa_q;
    endcase
    unique case (sel2)
      2'd1:    src2 = res_q;
      2'd2:    src2 = wb_data;
      default: src2 = opb_q;
    endcase
  end

  assign opb = alu_ctrl.use_imm ? alu_ctrl.imm : src2;

  execute_unit #(
    .ADDER_KIND(ADDER_KIND), .SHIFTER_KIND(SHIFTER_KIND),
    .CYCLE_NS(CYCLE_NS), .SHIFT_STEP_NS(SHIFT_STEP_NS)
  ) u_ex (
    .clk, .rst_n,
    .a(src1), .b(opb), .alu_op(alu_ctrl.alu_op),
    .is_shift(alu_valid && alu_ctrl.is_shift), .shift_op(alu_ctrl.shift_op),
    .shift_start(alu_valid && alu_first && alu_ctrl.is_shift),
    .link(alu_ctrl.link), .link_addr(link_addr),
    .result(result), .done(ex_done), .a_zero(a_zero), .overflow(overflow),
    .shift_go(shift_go)
  );

  pc_unit #(.ADDER_KIND(ADDER_KIND), .RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n,
    .fetch_en, .rf_load(!hold_rf), .alu_load(!hold_alu),
    .redirect, .jump_reg(alu_ctrl.jump_reg), .reg_target(src1), .disp(alu_ctrl.imm),
    .fetch_pc(imem_addr), .link_addr(link_addr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_q <= '0;
      st_q  <= '0;
    end else begin
      res_q <= result;
      st_q  <= src2;
    end
  end

  // ---------------- MEM stage ----------------
  logic [31:0] load_data;

  mem_data_io u_mio (
    .size(mem_ctrl.mem_size), .addr_lo(res_q[1:0]), .load_unsigned(mem_ctrl.load_unsigned),
    .store_data(st_q), .pad_wdata(dmem_wdata), .pad_be(dmem_be),
    .pad_rdata(dmem_rdata), .load_data(load_data)
  );

  assign dmem_addr = res_q;
  assign dmem_we   = mem_valid && mem_ctrl.is_store;
  assign dmem_re   = mem_valid && mem_ctrl.is_load;

  // ---------------- WB stage (input memory data register) ----------------
  logic wb_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid <= 1'b0;
      wb_we    <= 1'b0;
      wb_rd    <= '0;
      wb_data  <= '0;
    end else begin
      wb_valid <= mem_valid;
      wb_we    <= mem_valid && mem_ctrl.reg_write;
      wb_rd    <= mem_ctrl.rd;
      wb_data  <= mem_ctrl.is_load ? load_data : res_q;
    end
  end

  // ---------------- events ----------------
  assign ev_retire        = wb_valid;
  assign ev_bypass_result = alu_valid && !hold_alu && alu_first && (sel1 == 2'd1 || sel2 == 2'd1);
  assign ev_bypass_mdr    = alu_valid && !hold_alu && alu_first && (sel1 == 2'd2 || sel2 == 2'd2);
  assign ev_overflow      = alu_valid && !alu_ctrl.is_shift && !alu_ctrl.link &&
                            (alu_ctrl.alu_op == ALU_ADD || alu_ctrl.alu_op == ALU_SUB) &&
                            overflow && alu_first;
  assign shift_busy       = shift_go;
  assign ev_illegal       = rf_valid && !rf_ctrl.legal && !hold_rf;

endmodule
