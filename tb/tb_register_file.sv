// tb_register_file: self-checking test of register_file against a model
// array: random writes and reads on both ports, reads of the register being
// written in the same cycle (must return the new value) and writes to
// register 0 (must stay zero).
module tb_register_file;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic        we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  register_file u_dut (.clk, .rst_n, .raddr1(ra1), .rdata1(rd1), .raddr2(ra2), .rdata2(rd2),
                       .we, .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;

  function automatic logic [31:0] exp_read(logic [4:0] r);
    if (r == 0) return '0;
    if (we && wa == r) return wd;
    return model[r];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) model[i] = '0;
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we  = 1'($urandom);
      wa  = 5'($urandom);
      wd  = $urandom;
      ra1 = (n % 7 == 0) ? wa : 5'($urandom);
      ra2 = (n % 11 == 0) ? 5'd0 : 5'($urandom);
      #1;
      checks += 2;
      if (rd1 !== exp_read(ra1)) begin failures++; if (failures < 10) $display("FAIL port1 r%0d = %h exp %h", ra1, rd1, exp_read(ra1)); end
      if (rd2 !== exp_read(ra2)) begin failures++; if (failures < 10) $display("FAIL port2 r%0d = %h exp %h", ra2, rd2, exp_read(ra2)); end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
