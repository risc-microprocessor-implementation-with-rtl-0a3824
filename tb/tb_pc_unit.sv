// tb_pc_unit: self-checking test of pc_unit, once per adder flavour.
//
// Drives random fetch enables, PC chain loads and redirects (relative with a
// random displacement, or to a register target) and keeps a model of the
// fetch PC and of the two chain entries; after every clock fetch_pc and the
// link address are compared with the model, and the relative target with
// chain entry + displacement.
module tb_pc_unit;
  import dlx_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        fetch_en, rf_load, alu_load, redirect, jump_reg;
  logic [31:0] reg_target, disp;
  logic [31:0] pc [3], link [3];
  logic [31:0] m_pc, m_rf, m_alu;
  int checks = 0, failures = 0;

  pc_unit #(.ADDER_KIND(ADDER_RIPPLE), .RESET_PC(32'h100)) u0 (.clk, .rst_n, .fetch_en, .rf_load, .alu_load,
    .redirect, .jump_reg, .reg_target, .disp, .fetch_pc(pc[0]), .link_addr(link[0]));
  pc_unit #(.ADDER_KIND(ADDER_PPA),    .RESET_PC(32'h100)) u1 (.clk, .rst_n, .fetch_en, .rf_load, .alu_load,
    .redirect, .jump_reg, .reg_target, .disp, .fetch_pc(pc[1]), .link_addr(link[1]));
  pc_unit #(.ADDER_KIND(ADDER_PPA8X4), .RESET_PC(32'h100)) u2 (.clk, .rst_n, .fetch_en, .rf_load, .alu_load,
    .redirect, .jump_reg, .reg_target, .disp, .fetch_pc(pc[2]), .link_addr(link[2]));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fetch_en = 0; rf_load = 0; alu_load = 0; redirect = 0; jump_reg = 0; reg_target = 0; disp = 0;
    m_pc = 32'h100; m_rf = 0; m_alu = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      fetch_en = ($urandom % 4 != 0); rf_load = 1'($urandom); alu_load = 1'($urandom);
      redirect = ($urandom % 6 == 0); jump_reg = 1'($urandom);
      reg_target = {$urandom} & ~32'h3; disp = {{14{1'($urandom)}}, 18'($urandom)} & ~32'h3;
      @(posedge clk);
      if (rf_load) m_rf <= m_pc + 4;
      if (alu_load) m_alu <= m_rf;
      if (redirect) m_pc <= jump_reg ? reg_target : m_alu + disp;
      else if (fetch_en) m_pc <= m_pc + 4;
      #1;
      for (int k = 0; k < 3; k++) begin
        checks += 2;
        if (pc[k] !== m_pc)   begin failures++; if (failures < 10) $display("FAIL pc[%0d] %h exp %h", k, pc[k], m_pc); end
        if (link[k] !== m_alu) begin failures++; if (failures < 10) $display("FAIL link[%0d] %h exp %h", k, link[k], m_alu); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
