// tb_bypass_unit: self-checking test of bypass_unit. Random source and
// destination registers (drawn from a few registers so that matches are
// frequent), random valid/write flags and load instructions in the memory
// stage; the selections are compared with the priority rule: memory stage
// result first, then write-back value, register 0 and unused operands never.
module tb_bypass_unit;
  import dlx_pkg::*;
  logic [4:0] rs1, rs2, wb_rd;
  logic       u1, u2, mem_valid, wb_we;
  ctrl_t      mem_ctrl;
  logic [1:0] sel1, sel2;
  int checks = 0, failures = 0, hits1 = 0, hits2 = 0;

  bypass_unit u_dut (.rs1, .rs1_used(u1), .rs2, .rs2_used(u2), .mem_valid, .mem_ctrl,
                     .wb_we, .wb_rd, .sel1, .sel2);

  function automatic logic [1:0] model(logic [4:0] r, logic u);
    if (!u || r == 0) return 0;
    if (mem_valid && mem_ctrl.reg_write && !mem_ctrl.is_load && mem_ctrl.rd == r) return 1;
    if (wb_we && wb_rd == r) return 2;
    return 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      mem_ctrl = '0;
      rs1 = 5'($urandom % 4); rs2 = 5'($urandom % 4); u1 = 1'($urandom); u2 = 1'($urandom);
      mem_valid = 1'($urandom); mem_ctrl.reg_write = 1'($urandom); mem_ctrl.is_load = ($urandom % 4 == 0);
      mem_ctrl.rd = 5'($urandom % 4); wb_we = 1'($urandom); wb_rd = 5'($urandom % 4);
      #1;
      checks += 2;
      if (sel1 !== model(rs1, u1)) begin failures++; if (failures < 10) $display("FAIL sel1 %0d exp %0d", sel1, model(rs1, u1)); end
      if (sel2 !== model(rs2, u2)) begin failures++; if (failures < 10) $display("FAIL sel2 %0d exp %0d", sel2, model(rs2, u2)); end
      hits1 += int'(sel1 == 1); hits2 += int'(sel2 == 2);
    end
    checks++;
    if (hits1 == 0 || hits2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
