// alu: integer arithmetic and logic unit of the execute stage.
//
// Built around one adder, of the flavour chosen by ADDER_KIND. Addition uses
// a + b; subtraction and every set-conditional compare use a + ~b + 1 on the
// same adder. The compares read the flags of that subtraction: equal when the
// difference is zero, signed less-than when sign XOR overflow, unsigned
// less-than when there is no carry out. A set-conditional returns 1 or 0. The
// boolean unit supplies AND, OR and XOR; PASSB forwards operand b (used for
// LHI and for placing a link address on the result bus).
// a_zero reports whether operand a is zero, the condition of BEQZ/BNEZ.
// overflow flags signed overflow of an add or subtract; it is reported only,
// as this datapath has no trap logic. Purely combinational: the result is
// valid one adder delay plus a multiplexer after the operands.
module alu
  import dlx_pkg::*;
#(
  parameter int unsigned N          = 32,
  parameter adder_kind_e ADDER_KIND = ADDER_PPA
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  alu_op_e      op,
  output logic [N-1:0] y,
  output logic         a_zero,
  output logic         overflow
);

  logic         sub;
  logic [N-1:0] b_in, sum, logic_y;
  logic         cout;

  assign sub  = (op != ALU_ADD);
  assign b_in = sub ? ~b : b;

  dlx_adder #(.N(N), .KIND(ADDER_KIND)) u_adder (
    .a(a), .b(b_in), .cin(sub), .s(sum), .cout(cout)
  );

  boolean_unit #(.N(N)) u_bool (.a(a), .b(b), .op(op), .y(logic_y));

  logic eq, lt_s, lt_u;
  assign overflow = (a[N-1] == b_in[N-1]) && (sum[N-1] != a[N-1]);
  assign eq       = (sum == '0);
  assign lt_s     = sum[N-1] ^ overflow;
  assign lt_u     = ~cout;
  assign a_zero   = (a == '0);

  logic setv;
  always_comb begin
    setv = 1'b0;
    unique case (op)
      ALU_SEQ:  setv = eq;
      ALU_SNE:  setv = !eq;
      ALU_SLT:  setv = lt_s;
      ALU_SGT:  setv = !lt_s && !eq;
      ALU_SLE:  setv = lt_s || eq;
      ALU_SGE:  setv = !lt_s;
      ALU_SLTU: setv = lt_u;
      ALU_SGTU: setv = !lt_u && !eq;
      ALU_SLEU: setv = lt_u || eq;
      ALU_SGEU: setv = !lt_u;
      default:  setv = 1'b0;
    endcase
  end

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB:         y = sum;
      ALU_AND, ALU_OR, ALU_XOR: y = logic_y;
      ALU_PASSB:                y = b;
      default:                  y = {{(N-1){1'b0}}, setv};
    endcase
  end

endmodule
