// tb_pipeline_control: self-checking test of pipeline_control. Directed
// stage contents (shift not finished, load followed by a user of its value,
// branch or jump in register fetch or ALU stage with the condition true or
// false) are applied and every output is compared with the values the stall
// rules give for that case. Then random stage contents (with register
// numbers drawn from a small set so that matches are frequent) are checked
// against a procedural model of the same rules.
module tb_pipeline_control;
  import dlx_pkg::*;
  logic  rf_valid, alu_valid, ex_done, a_zero;
  ctrl_t rf_ctrl, alu_ctrl;
  logic  hold_alu, hold_rf, bubble_alu, fetch_en, fetch_valid, redirect;
  logic  ev_shift_stall, ev_load_stall, ev_branch_stall;
  int checks = 0, failures = 0;

  pipeline_control u_dut (.*);

  // expected {hold_alu, hold_rf, bubble_alu, fetch_en, fetch_valid, redirect, ev_shift, ev_load, ev_branch}
  task automatic expect_out(logic [8:0] e, string what);
    #1;
    checks++;
    if ({hold_alu, hold_rf, bubble_alu, fetch_en, fetch_valid, redirect,
         ev_shift_stall, ev_load_stall, ev_branch_stall} !== e) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, {hold_alu, hold_rf, bubble_alu, fetch_en, fetch_valid,
               redirect, ev_shift_stall, ev_load_stall, ev_branch_stall}, e);
    end
  endtask

  task automatic clear();
    rf_valid = 1; alu_valid = 1; ex_done = 1; a_zero = 0; rf_ctrl = '0; alu_ctrl = '0;
    rf_ctrl.rs1 = 5'd1; rf_ctrl.rs2 = 5'd2; rf_ctrl.rs1_used = 1; rf_ctrl.rs2_used = 1;
    alu_ctrl.rd = 5'd9; alu_ctrl.reg_write = 1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear();                                   expect_out(9'b000110000, "free flow");
    clear(); ex_done = 0;                      expect_out(9'b110010100, "shift running");
    clear(); ex_done = 0; alu_valid = 0;       expect_out(9'b000110000, "bubble in ALU");
    clear(); alu_ctrl.is_load = 1; alu_ctrl.rd = 5'd1;
                                               expect_out(9'b011010010, "load then use rs1");
    clear(); alu_ctrl.is_load = 1; alu_ctrl.rd = 5'd2;
                                               expect_out(9'b011010010, "load then use rs2");
    clear(); alu_ctrl.is_load = 1; alu_ctrl.rd = 5'd2; rf_ctrl.rs2_used = 0;
                                               expect_out(9'b000110000, "load, operand unused");
    clear(); alu_ctrl.is_load = 1; alu_ctrl.rd = 5'd1; alu_ctrl.reg_write = 0;
                                               expect_out(9'b000110000, "load to r0");
    clear(); alu_ctrl.is_load = 1; alu_ctrl.rd = 5'd1; rf_valid = 0;
                                               expect_out(9'b000110000, "load, bubble behind");
    clear(); rf_ctrl.is_branch = 1;            expect_out(9'b000000001, "branch in RF");
    clear(); alu_ctrl.is_branch = 1; a_zero = 1;
                                               expect_out(9'b000001001, "BEQZ taken");
    clear(); alu_ctrl.is_branch = 1; a_zero = 0;
                                               expect_out(9'b000000001, "BEQZ not taken");
    clear(); alu_ctrl.is_branch = 1; alu_ctrl.branch_nez = 1; a_zero = 0;
                                               expect_out(9'b000001001, "BNEZ taken");
    clear(); alu_ctrl.is_jump = 1; a_zero = 0; expect_out(9'b000001001, "jump");
    clear(); alu_ctrl.is_jump = 1; alu_valid = 0;
                                               expect_out(9'b000110000, "jump bubble");
    clear(); rf_ctrl.is_jump = 1; alu_ctrl.is_load = 1; alu_ctrl.rd = 5'd1;
                                               expect_out(9'b011000010, "JR waiting for a load");
    for (int n = 0; n < 4000; n++) begin
      logic [8:0] e;
      bit stall_ex, lu, ctl_rf, ctl_alu, tk;
      clear();
      rf_valid = 1'($urandom); alu_valid = 1'($urandom); ex_done = ($urandom % 4) != 0; a_zero = 1'($urandom);
      rf_ctrl.rs1 = 5'($urandom % 4); rf_ctrl.rs2 = 5'($urandom % 4);
      rf_ctrl.rs1_used = 1'($urandom); rf_ctrl.rs2_used = 1'($urandom);
      rf_ctrl.is_branch = ($urandom % 4) == 0; rf_ctrl.is_jump = ($urandom % 6) == 0;
      alu_ctrl.rd = 5'($urandom % 4); alu_ctrl.reg_write = 1'($urandom);
      alu_ctrl.is_load = 1'($urandom);
      alu_ctrl.is_branch = ($urandom % 4) == 0; alu_ctrl.is_jump = ($urandom % 6) == 0;
      alu_ctrl.branch_nez = 1'($urandom);
      // model
      stall_ex = alu_valid && !ex_done;
      lu = 0;
      if (rf_valid && alu_valid && alu_ctrl.is_load && alu_ctrl.reg_write) begin
        if (rf_ctrl.rs1_used && rf_ctrl.rs1 == alu_ctrl.rd) lu = 1;
        if (rf_ctrl.rs2_used && rf_ctrl.rs2 == alu_ctrl.rd) lu = 1;
      end
      ctl_rf  = rf_valid && (rf_ctrl.is_branch || rf_ctrl.is_jump);
      ctl_alu = alu_valid && (alu_ctrl.is_branch || alu_ctrl.is_jump);
      if (alu_ctrl.is_jump) tk = 1;
      else if (alu_ctrl.branch_nez) tk = !a_zero;
      else tk = a_zero;
      e[8] = stall_ex;                                  // hold_alu
      e[7] = stall_ex || lu;                            // hold_rf
      e[6] = lu;                                        // bubble_alu
      e[5] = !(stall_ex || lu) && !(ctl_rf || ctl_alu); // fetch_en
      e[4] = !(ctl_rf || ctl_alu);                      // fetch_valid
      e[3] = ctl_alu && !stall_ex && tk;                // redirect
      e[2] = stall_ex;                                  // shift stall event
      e[1] = lu && !stall_ex;                           // load stall event
      e[0] = (ctl_rf || ctl_alu) && !(stall_ex || lu);  // branch stall event
      expect_out(e, $sformatf("random case %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
