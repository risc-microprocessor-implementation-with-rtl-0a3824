// pc_unit: program counter, incrementer, displacement adder and PC chain.
//
// fetch_pc is the address of the instruction being fetched. The incrementer
// (an adder of the same flavour as the ALU's, adding 4) forms the
// next sequential address. The PC chain keeps, for the instructions in the
// register-fetch and ALU stages, the address that follows each of them
// (its PC + 4); the ALU-stage entry is the link address of JAL/JALR. The
// displacement adder adds a sign-extended branch or jump offset to that
// entry, so branches and jumps are relative to the address after them. A
// register jump takes its target from the source-1 operand instead.
//
// Timing: at a clock edge, redirect loads the target into fetch_pc, else
// fetch_en loads the next sequential address. The chain entries advance with
// the instruction register stages (rf_load, alu_load). Reset sets fetch_pc to
// RESET_PC (own choice: the reset address is not specified).
module pc_unit
  import dlx_pkg::*;
#(
  parameter adder_kind_e ADDER_KIND = ADDER_PPA,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fetch_en,
  input  logic        rf_load,
  input  logic        alu_load,
  input  logic        redirect,
  input  logic        jump_reg,
  input  logic [31:0] reg_target,
  input  logic [31:0] disp,
  output logic [31:0] fetch_pc,
  output logic [31:0] link_addr
);

  logic [31:0] next_seq, disp_sum, target;
  logic [31:0] rf_npc, alu_npc;
  logic        inc_cout, disp_cout;

  // Incrementer: PC + 4
  dlx_adder #(.N(32), .KIND(ADDER_KIND)) u_inc (
    .a(fetch_pc), .b(32'd4), .cin(1'b0), .s(next_seq), .cout(inc_cout)
  );

  // Displacement adder
  dlx_adder #(.N(32), .KIND(ADDER_KIND)) u_disp (
    .a(alu_npc), .b(disp), .cin(1'b0), .s(disp_sum), .cout(disp_cout)
  );

  assign target    = jump_reg ? reg_target : disp_sum;
  assign link_addr = alu_npc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_pc <= RESET_PC;
      rf_npc   <= '0;
      alu_npc  <= '0;
    end else begin
      if (redirect)      fetch_pc <= target;
      else if (fetch_en) fetch_pc <= next_seq;
      if (rf_load)  rf_npc  <= next_seq;
      if (alu_load) alu_npc <= rf_npc;
    end
  end

endmodule
