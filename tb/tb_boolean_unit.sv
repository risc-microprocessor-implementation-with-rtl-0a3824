// tb_boolean_unit: self-checking test of boolean_unit. Random operands for
// AND, OR and XOR, plus an arithmetic op code that must give zero.
module tb_boolean_unit;
  import dlx_pkg::*;
  logic [31:0] a, b, y, e;
  alu_op_e op;
  int checks = 0, failures = 0;

  boolean_unit u_dut (.a, .b, .op, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      a = $urandom; b = $urandom;
      case (n % 4)
        0: begin op = ALU_AND; e = a & b; end
        1: begin op = ALU_OR;  e = a | b; end
        2: begin op = ALU_XOR; e = a ^ b; end
        default: begin op = ALU_ADD; e = '0; end
      endcase
      #1;
      checks++;
      if (y !== e) begin failures++; $display("FAIL op %s %h %h -> %h", op.name(), a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
