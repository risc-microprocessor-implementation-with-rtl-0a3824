// boolean_unit: the ALU's bitwise logic section.
//
// Computes a AND b, a OR b or a XOR b bit by bit, selected by op; any other
// op gives zero. Purely combinational, no carry chain, so it is never the
// slow path of the ALU.
module boolean_unit
  import dlx_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  alu_op_e      op,
  output logic [N-1:0] y
);

  always_comb begin
    unique case (op)
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      default: y = '0;
    endcase
  end

endmodule
