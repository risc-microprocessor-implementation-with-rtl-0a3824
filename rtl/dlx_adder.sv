// dlx_adder: the adder used throughout the datapath (ALU, PC incrementer and
// PC displacement adder), with its flavour chosen by a parameter.
//
// KIND selects a ripple carry adder, a full-width parallel prefix adder or a
// cascade of 8-bit parallel prefix adders. All three compute the same sum;
// they differ only in delay and area, which is what the design points trade.
// The ALU and both PC adders always use the same flavour. Combinational.
module dlx_adder
  import dlx_pkg::*;
#(
  parameter int unsigned N    = 32,
  parameter adder_kind_e KIND = ADDER_PPA
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  if (KIND == ADDER_RIPPLE) begin : g_rca
    ripple_carry_adder #(.N(N)) u_add (.a, .b, .cin, .s, .cout);
  end else if (KIND == ADDER_PPA) begin : g_ppa
    pp_adder #(.N(N)) u_add (.a, .b, .cin, .s, .cout);
  end else begin : g_ppa8
    pp_adder_cascade #(.N(N), .SECTION(8)) u_add (.a, .b, .cin, .s, .cout);
  end

endmodule
