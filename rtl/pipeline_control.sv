// pipeline_control: stall and bubble logic of the five-stage pipeline.
//
// Three conditions hold instructions back:
//  * Shift stall: a shift in the ALU stage whose linear shift has not
//    finished (ex_done low) holds the ALU stage and everything behind it;
//    bubbles go on into the memory stage.
//  * Branch stall: while a branch or jump is in the register-fetch or ALU
//    stage nothing new is fetched; bubbles enter the pipeline instead. The
//    branch condition (source operand zero or not) and the target are
//    worked out in the ALU stage, and the next fetch uses the right address,
//    so every branch or jump costs two bubble cycles and nothing fetched
//    after it is ever executed.
//  * Load interlock (own choice; the circuit this follows does not say how
//    a loaded value that is needed at once is handled): an instruction in
//    register fetch that reads the register a load in the ALU stage will
//    write waits one cycle, and a bubble enters the ALU stage.
// Outputs are combinational in the current stage contents. The ev_* outputs
// pulse once per stall cycle of each kind, for performance counting.
module pipeline_control
  import dlx_pkg::*;
(
  input  logic  rf_valid,
  input  ctrl_t rf_ctrl,
  input  logic  alu_valid,
  input  ctrl_t alu_ctrl,
  input  logic  ex_done,
  input  logic  a_zero,
  output logic  hold_alu,
  output logic  hold_rf,
  output logic  bubble_alu,
  output logic  fetch_en,
  output logic  fetch_valid,
  output logic  redirect,
  output logic  ev_shift_stall,
  output logic  ev_load_stall,
  output logic  ev_branch_stall
);

  logic load_use, rf_ctl, alu_ctl, branch_block, taken;

  assign hold_alu = alu_valid && !ex_done;

  assign load_use = rf_valid && alu_valid && alu_ctrl.is_load && alu_ctrl.reg_write &&
                    ((rf_ctrl.rs1_used && rf_ctrl.rs1 == alu_ctrl.rd) ||
                     (rf_ctrl.rs2_used && rf_ctrl.rs2 == alu_ctrl.rd));

  assign hold_rf    = hold_alu || load_use;
  assign bubble_alu = load_use;

  assign rf_ctl       = rf_valid  && (rf_ctrl.is_branch  || rf_ctrl.is_jump);
  assign alu_ctl      = alu_valid && (alu_ctrl.is_branch || alu_ctrl.is_jump);
  assign branch_block = rf_ctl || alu_ctl;

  assign fetch_valid = !branch_block;
  assign fetch_en    = !hold_rf && !branch_block;

  assign taken    = alu_ctrl.is_jump || (alu_ctrl.branch_nez ? !a_zero : a_zero);
  assign redirect = alu_ctl && !hold_alu && taken;

  assign ev_shift_stall  = hold_alu;
  assign ev_load_stall   = load_use && !hold_alu;
  assign ev_branch_stall = branch_block && !hold_rf;

endmodule
