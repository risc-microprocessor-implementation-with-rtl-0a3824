// instr_register: instruction register chain with a decoder per stage.
//
// The fetched instruction enters the register-fetch (RF) copy, moves on to
// the ALU copy and then to the memory (MEM) copy, one stage per cycle: a
// shift register three stages deep for every instruction bit. Each copy has
// a valid bit (0 marks a bubble) and its own decoder, which produces the
// control word used by that stage.
//
// Controls, sampled at the clock edge: hold_rf keeps the RF copy (and fetch
// is not accepted); hold_alu keeps the ALU copy, and a bubble enters MEM;
// bubble_alu, when the RF copy moves on while hold_rf is set only by a load
// interlock, puts a bubble into the ALU stage. fetch_valid = 0 loads a bubble
// into RF (used while a branch is being resolved). alu_first is high in the
// first cycle an instruction spends in the ALU stage.
module instr_register
  import dlx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] fetch_instr,
  input  logic        fetch_valid,
  input  logic        hold_rf,
  input  logic        hold_alu,
  input  logic        bubble_alu,
  output logic        rf_valid,
  output ctrl_t       rf_ctrl,
  output logic        alu_valid,
  output logic        alu_first,
  output ctrl_t       alu_ctrl,
  output logic        mem_valid,
  output ctrl_t       mem_ctrl
);

  logic [31:0] ir_rf, ir_alu, ir_mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_rf     <= '0;
      ir_alu    <= '0;
      ir_mem    <= '0;
      rf_valid  <= 1'b0;
      alu_valid <= 1'b0;
      alu_first <= 1'b0;
      mem_valid <= 1'b0;
    end else begin
      if (!hold_rf) begin
        ir_rf    <= fetch_instr;
        rf_valid <= fetch_valid;
      end
      if (!hold_alu) begin
        ir_alu    <= ir_rf;
        alu_valid <= rf_valid && !bubble_alu;
        alu_first <= 1'b1;
      end else begin
        alu_first <= 1'b0;
      end
      ir_mem    <= ir_alu;
      mem_valid <= alu_valid && !hold_alu;
    end
  end

  decoder u_dec_rf  (.instr(ir_rf),  .ctrl(rf_ctrl));
  decoder u_dec_alu (.instr(ir_alu), .ctrl(alu_ctrl));
  decoder u_dec_mem (.instr(ir_mem), .ctrl(mem_ctrl));

endmodule
