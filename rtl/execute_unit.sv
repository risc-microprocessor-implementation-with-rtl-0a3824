// execute_unit: ALU and shifter side by side, driving the result bus.
//
// The ALU (with the adder flavour ADDER_KIND) and the shifter (barrel or
// linear, SHIFTER_KIND) both see the two source operands. The result bus
// carries the link address for JAL/JALR, the shifter output for a shift and
// the ALU output otherwise. The shift amount is the low five bits of operand
// b.
//
// With the barrel shifter every operation finishes in its cycle and done is
// always 1. With the linear shifter a shift is started by shift_start (first
// cycle of a shift in the ALU stage) and done stays low until the last cycle
// of the shift; the pipeline holds the shift in the ALU stage until then.
// CYCLE_NS and SHIFT_STEP_NS set how many one-bit steps the linear shifter
// completes per machine cycle.
module execute_unit
  import dlx_pkg::*;
#(
  parameter adder_kind_e   ADDER_KIND    = ADDER_PPA,
  parameter shifter_kind_e SHIFTER_KIND  = SHIFTER_LINEAR,
  parameter int unsigned   CYCLE_NS      = 33,
  parameter int unsigned   SHIFT_STEP_NS = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     alu_op,
  input  logic        is_shift,
  input  shift_op_e   shift_op,
  input  logic        shift_start,
  input  logic        link,
  input  logic [31:0] link_addr,
  output logic [31:0] result,
  output logic        done,
  output logic        a_zero,
  output logic        overflow,
  output logic        shift_go
);

  logic [31:0] alu_y, sh_y;
  logic        sh_done;

  alu #(.N(32), .ADDER_KIND(ADDER_KIND)) u_alu (
    .a(a), .b(b), .op(alu_op), .y(alu_y), .a_zero(a_zero), .overflow(overflow)
  );

  if (SHIFTER_KIND == SHIFTER_BARREL) begin : g_barrel
    barrel_shifter #(.N(32)) u_sh (
      .din(a), .amount(b[4:0]), .op(shift_op), .dout(sh_y)
    );
    assign sh_done  = 1'b1;
    assign shift_go = 1'b0;
  end else begin : g_linear
    linear_shifter #(.N(32), .CYCLE_NS(CYCLE_NS), .STEP_NS(SHIFT_STEP_NS)) u_sh (
      .clk(clk), .rst_n(rst_n), .start(shift_start), .din(a), .amount(b[4:0]),
      .op(shift_op), .dout(sh_y), .done(sh_done), .go(shift_go)
    );
  end

  assign result = link ? link_addr : (is_shift ? sh_y : alu_y);
  assign done   = !is_shift || sh_done;

endmodule
