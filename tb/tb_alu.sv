// tb_alu: self-checking test of alu with each adder flavour.
//
// Three ALUs (ripple carry, parallel prefix, cascaded 8-bit parallel
// prefix) get the same random and corner operands for every operation; each
// result, the zero test of operand a and the overflow flag of add and
// subtract are compared with values computed with SystemVerilog operators.
module tb_alu;
  import dlx_pkg::*;
  logic [31:0] a, b, y0, y1, y2, e;
  logic        z0, z1, z2, v0, v1, v2, ev;
  alu_op_e     op;
  int checks = 0, failures = 0;

  alu #(.ADDER_KIND(ADDER_RIPPLE)) u_rca  (.a, .b, .op, .y(y0), .a_zero(z0), .overflow(v0));
  alu #(.ADDER_KIND(ADDER_PPA))    u_ppa  (.a, .b, .op, .y(y1), .a_zero(z1), .overflow(v1));
  alu #(.ADDER_KIND(ADDER_PPA8X4)) u_ppa8 (.a, .b, .op, .y(y2), .a_zero(z2), .overflow(v2));

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] w);
    case (o)
      ALU_ADD:  return x + w;
      ALU_SUB:  return x - w;
      ALU_AND:  return x & w;
      ALU_OR:   return x | w;
      ALU_XOR:  return x ^ w;
      ALU_PASSB: return w;
      ALU_SEQ:  return 32'(x == w);
      ALU_SNE:  return 32'(x != w);
      ALU_SLT:  return 32'($signed(x) <  $signed(w));
      ALU_SGT:  return 32'($signed(x) >  $signed(w));
      ALU_SLE:  return 32'($signed(x) <= $signed(w));
      ALU_SGE:  return 32'($signed(x) >= $signed(w));
      ALU_SLTU: return 32'(x <  w);
      ALU_SGTU: return 32'(x >  w);
      ALU_SLEU: return 32'(x <= w);
      default:  return 32'(x >= w);
    endcase
  endfunction

  task automatic try(alu_op_e o, logic [31:0] x, logic [31:0] w);
    logic [31:0] r;
    op = o; a = x; b = w;
    #1;
    e  = model(o, x, w);
    r  = (o == ALU_ADD) ? x + w : x - w;
    ev = (o == ALU_ADD) ? (x[31] == w[31] && r[31] != x[31]) : (x[31] != w[31] && r[31] != x[31]);
    checks++;
    if (y0 !== e || y1 !== e || y2 !== e || z0 !== (x == 0) || z1 !== (x == 0) || z2 !== (x == 0)) begin
      failures++;
      if (failures < 10) $display("FAIL %s %h %h: %h %h %h exp %h", o.name(), x, w, y0, y1, y2, e);
    end
    if (o == ALU_ADD || o == ALU_SUB) begin
      checks++;
      if (v0 !== ev || v1 !== ev || v2 !== ev) begin
        failures++;
        if (failures < 10) $display("FAIL overflow %s %h %h", o.name(), x, w);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'h8000_0001};
    for (int o = 0; o < 16; o++) begin
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) try(alu_op_e'(o), corner[i], corner[j]);
      for (int n = 0; n < 300; n++) begin
        automatic logic [31:0] x = $urandom;
        try(alu_op_e'(o), x, (n % 5 == 0) ? x : $urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
