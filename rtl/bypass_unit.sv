// bypass_unit: operand bypass comparators of the register file unit.
//
// For each of the two source operands of the instruction in the ALU stage,
// compares its register number with the destinations of the two
// instructions ahead of it. If the instruction in the memory stage will write
// that register, the operand is taken from the result bypass register (the
// latched result bus); otherwise, if the instruction in the write-back stage
// will, it is taken from the input memory data register; otherwise the value
// read from the register array is used. The nearer instruction wins.
// Register 0 is never bypassed. A load in the memory stage has no data yet
// and is not a bypass source; the interlock in pipeline_control makes sure
// no consumer needs it then. Purely combinational.
module bypass_unit
  import dlx_pkg::*;
(
  input  logic [4:0] rs1,
  input  logic       rs1_used,
  input  logic [4:0] rs2,
  input  logic       rs2_used,
  input  logic       mem_valid,
  input  ctrl_t      mem_ctrl,
  input  logic       wb_we,
  input  logic [4:0] wb_rd,
  output logic [1:0] sel1,     // 0: register array, 1: result register, 2: memory data register
  output logic [1:0] sel2
);

  logic mem_src;
  assign mem_src = mem_valid && mem_ctrl.reg_write && !mem_ctrl.is_load;

  function automatic logic [1:0] pick(input logic [4:0] rs, input logic used);
    if (!used || rs == 5'd0)                  return 2'd0;
    else if (mem_src && mem_ctrl.rd == rs)    return 2'd1;
    else if (wb_we && wb_rd == rs)            return 2'd2;
    else                                      return 2'd0;
  endfunction

  assign sel1 = pick(rs1, rs1_used);
  assign sel2 = pick(rs2, rs2_used);

endmodule
