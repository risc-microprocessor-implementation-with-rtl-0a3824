// tb_instr_register: self-checking test of instr_register.
//
// Feeds ADDI instructions with a unique immediate each, under random hold,
// bubble and fetch-valid controls (a held ALU stage always holds the RF
// stage too, as the pipeline control guarantees), and tracks a model of the
// three stage copies. After every clock the valid bits, the first-cycle flag
// and the immediate decoded in each stage are compared with the model.
module tb_instr_register;
  import dlx_pkg::*;
  import tb_dlx_pkg::i_type;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] fetch_instr;
  logic        fetch_valid, hold_rf, hold_alu, bubble_alu;
  logic        rf_valid, alu_valid, alu_first, mem_valid;
  ctrl_t       rf_ctrl, alu_ctrl, mem_ctrl;
  logic [31:0] m_rf, m_alu, m_mem;
  logic        mv_rf, mv_alu, mv_mem, m_first;
  int checks = 0, failures = 0;

  instr_register u_dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fetch_instr = '0; fetch_valid = 0; hold_rf = 0; hold_alu = 0; bubble_alu = 0;
    m_rf = '0; m_alu = '0; m_mem = '0; mv_rf = 0; mv_alu = 0; mv_mem = 0; m_first = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      fetch_instr = i_type('h08, 1, 2, n);
      fetch_valid = ($urandom % 5 != 0);
      hold_alu    = ($urandom % 5 == 0);
      bubble_alu  = !hold_alu && ($urandom % 6 == 0);
      hold_rf     = hold_alu || bubble_alu;
      @(posedge clk);
      m_mem  <= m_alu;
      mv_mem <= mv_alu && !hold_alu;
      if (!hold_alu) begin m_alu <= m_rf; mv_alu <= mv_rf && !bubble_alu; m_first <= 1; end
      else m_first <= 0;
      if (!hold_rf) begin m_rf <= fetch_instr; mv_rf <= fetch_valid; end
      #1;
      check(rf_valid == mv_rf && alu_valid == mv_alu && mem_valid == mv_mem, "valid bits");
      check(alu_first == m_first, "first-cycle flag");
      check(rf_ctrl.imm[15:0] == m_rf[15:0], "RF copy");
      check(alu_ctrl.imm[15:0] == m_alu[15:0], "ALU copy");
      check(mem_ctrl.imm[15:0] == m_mem[15:0], "MEM copy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
