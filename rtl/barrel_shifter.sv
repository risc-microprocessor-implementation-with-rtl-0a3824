// barrel_shifter: one-cycle 32-bit shifter built as a logarithmic rotator.
//
// The core is K = log2(N) ranks of N two-input multiplexer cells. Rank i,
// enabled by amount bit i, makes each output bit j take the rank's input bit
// (j + 2**i) mod N, so after all ranks out[j] = in[(j + amount) mod N]: a
// rotate towards bit 0 by the amount, with the connections wrapped around at
// the ends. The rotator is the design's; turning it into the three DLX
// shifts is this design's own choice: a right logical or arithmetic shift
// rotates and then replaces the top `amount` bits by zeros or by the sign
// bit, and a left shift reverses the bit order before and after a right
// shift. Purely combinational: the whole shift takes one machine cycle.
module barrel_shifter
  import dlx_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned K = $clog2(N)
) (
  input  logic [N-1:0] din,
  input  logic [K-1:0] amount,
  input  shift_op_e    op,
  output logic [N-1:0] dout
);

  function automatic logic [N-1:0] reverse(input logic [N-1:0] x);
    for (int i = 0; i < N; i++) reverse[i] = x[N-1-i];
  endfunction

  logic         left;
  logic [N-1:0] rin;
  logic [N-1:0] rank [K+1];

  assign left    = (op == SH_SLL);
  assign rin     = left ? reverse(din) : din;
  assign rank[0] = rin;

  // Rotator ranks of multiplexer cells
  for (genvar i = 0; i < K; i++) begin : g_rank
    for (genvar j = 0; j < N; j++) begin : g_mux
      assign rank[i+1][j] = amount[i] ? rank[i][(j + (1 << i)) % N] : rank[i][j];
    end
  end

  // Fill the bits that wrapped around
  logic [N-1:0] keep;   // 1 where the rotated bit is a genuine shifted bit
  logic         fill;
  logic [N-1:0] shifted;
  assign keep    = {N{1'b1}} >> amount;
  assign fill    = (op == SH_SRA) ? din[N-1] : 1'b0;
  assign shifted = (rank[K] & keep) | ({N{fill}} & ~keep);
  assign dout    = left ? reverse(shifted) : shifted;

endmodule
