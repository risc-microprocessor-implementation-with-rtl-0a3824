// pp_adder: N-bit parallel prefix (carry-lookahead tree) adder, N a power of 2.
//
// Two kinds of cells form a binary tree. An "A" cell per bit makes the
// generate g = a & b and propagate p = a | b of its bit and, once its carry is
// known, the sum s = a ^ b ^ c. A "B" cell joins the (G, P) pairs of two
// adjacent blocks into the pair of the combined block,
//   G = G_hi | P_hi & G_lo,   P = P_hi & P_lo,
// on the way up the tree, and on the way down turns the carry into the block
// (c_i) into the carry into its upper half, c_mid = G_lo | P_lo & c_i, while
// the lower half receives c_i unchanged. The root receives cin. The carry
// into every bit is thus known after about 2*log2(N) cell delays, against N
// for the ripple carry adder, at the price of the tree's cells and wiring.
// cout = G_all | P_all & cin. Purely combinational.
module pp_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned L = $clog2(N);

  // Level l of the tree has N >> l nodes; node i covers the 2**l bits from
  // bit i*2**l. g/p: block generate and propagate; c: carry into the block.
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    localparam int unsigned M = N >> l;
    logic [M-1:0] g, p, c;

    if (l == 0) begin : g_a
      // A cells: bit generate and propagate
      assign g = a & b;
      assign p = a | b;
    end else begin : g_b
      // B cells, up the tree
      for (genvar i = 0; i < M; i++) begin : g_node
        assign g[i] = g_lvl[l-1].g[2*i+1] | (g_lvl[l-1].p[2*i+1] & g_lvl[l-1].g[2*i]);
        assign p[i] = g_lvl[l-1].p[2*i+1] & g_lvl[l-1].p[2*i];
      end
    end

    if (l == L) begin : g_root
      assign c[0] = cin;
    end else begin : g_carry
      // B cells, down the tree: the lower half inherits the block's carry,
      // the upper half gets the carry out of the lower half
      for (genvar i = 0; i < M; i++) begin : g_node
        if (i % 2 == 0) begin : g_lo
          assign c[i] = g_lvl[l+1].c[i/2];
        end else begin : g_hi
          assign c[i] = g[i-1] | (p[i-1] & g_lvl[l+1].c[i/2]);
        end
      end
    end
  end

  // A cells: sums
  assign s    = a ^ b ^ g_lvl[0].c;
  assign cout = g_lvl[L].g[0] | (g_lvl[L].p[0] & cin);

endmodule
