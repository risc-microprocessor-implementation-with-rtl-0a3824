// pp_adder_cascade: wide adder made of narrow parallel prefix adders whose
// carries ripple from one to the next.
//
// The default is the 32-bit adder of four 8-bit parallel prefix adders: each
// 8-bit section adds its slice of a and b with the carry out of the section
// below it, the lowest section taking cin. The delay is that of one 8-bit
// tree plus three carry hops, between the ripple carry adder and the full
// 32-bit tree, with an area in between as well. Purely combinational.
module pp_adder_cascade #(
  parameter int unsigned N       = 32,
  parameter int unsigned SECTION = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned NSEC = N / SECTION;

  logic [NSEC:0] c;
  assign c[0] = cin;

  for (genvar k = 0; k < NSEC; k++) begin : g_sec
    pp_adder #(.N(SECTION)) u_ppa (
      .a   (a[k*SECTION +: SECTION]),
      .b   (b[k*SECTION +: SECTION]),
      .cin (c[k]),
      .s   (s[k*SECTION +: SECTION]),
      .cout(c[k+1])
    );
  end

  assign cout = c[NSEC];

endmodule
