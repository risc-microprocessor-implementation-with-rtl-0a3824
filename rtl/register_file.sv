// register_file: the 32 x 32-bit general purpose register array.
//
// Two read ports (source 1 and source 2 buses) and one write port. Reads are
// combinational. A write happens at the clock edge; a read of the register
// being written in the same cycle returns the new value, because the array
// is written in the first half of the write-back cycle and read in the second
// half of the register-fetch cycle. Register 0 always reads as zero and
// writes to it are dropped. The array itself is a two-port static memory in
// the circuit this follows; here it is an array of flip-flops, and reset
// clears it (own choice, so that simulation starts from known contents).
module register_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned XLEN  = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [AW-1:0]   raddr1,
  output logic [XLEN-1:0] rdata1,
  input  logic [AW-1:0]   raddr2,
  output logic [XLEN-1:0] rdata2,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  logic [XLEN-1:0] wdata
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  function automatic logic [XLEN-1:0] read(input logic [AW-1:0] ra);
    if (ra == '0)                 return '0;
    else if (we && waddr == ra)   return wdata;
    else                          return regs[ra];
  endfunction

  assign rdata1 = read(raddr1);
  assign rdata2 = read(raddr2);

endmodule
