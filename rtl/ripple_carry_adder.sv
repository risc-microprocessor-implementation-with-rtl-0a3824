// ripple_carry_adder: N-bit adder built from a chain of full adders.
//
// Bit i adds a[i], b[i] and the carry from bit i-1; the carry out of the top
// bit is cout. The carry therefore ripples through all N cells, so the delay
// grows linearly with N while the area is one full adder per bit. This is the
// slow, small adder flavour of the datapath. Each full adder computes
// s = a ^ b ^ c and c_next = (a ^ b) & c | (a & b), as the full adder cell of
// the design does. Purely combinational; no clock.
module ripple_carry_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    logic x;
    assign x        = a[i] ^ b[i];
    assign s[i]     = x ^ c[i];
    assign c[i+1]   = (x & c[i]) | (a[i] & b[i]);
  end

  assign cout = c[N];

endmodule
