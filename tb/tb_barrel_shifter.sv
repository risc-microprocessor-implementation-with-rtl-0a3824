// tb_barrel_shifter: self-checking test of barrel_shifter. Every shift
// amount 0..31 with SLL, SRL and SRA on random and sign-heavy operands,
// compared with SystemVerilog shift operators. The result is combinational,
// i.e. available in the same cycle.
module tb_barrel_shifter;
  import dlx_pkg::*;
  logic [31:0] din, dout, e;
  logic [4:0]  amount;
  shift_op_e   op;
  int checks = 0, failures = 0;

  barrel_shifter u_dut (.din, .amount, .op, .dout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40; n++)
      for (int s = 0; s < 32; s++)
        for (int o = 0; o < 3; o++) begin
          din    = (n == 0) ? 32'h8000_0001 : (n == 1) ? 32'hFFFF_FFFF : $urandom;
          amount = 5'(s);
          op     = shift_op_e'(o);
          #1;
          e = (o == 0) ? din << s : (o == 1) ? din >> s : 32'($signed(din) >>> s);
          checks++;
          if (dout !== e) begin
            failures++;
            if (failures < 10) $display("FAIL %s %h by %0d = %h exp %h", op.name(), din, s, dout, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
