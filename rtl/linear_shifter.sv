// linear_shifter: small multi-cycle shifter made of a one-bit shift register.
//
// Each of the N stages holds one bit and passes it to its neighbour on every
// shift step, so a shift by n takes n steps. A counter loaded with the shift
// amount counts the steps down; the shift register keeps stepping while the
// counter is non-zero (the "go" condition). In the circuit this follows, the
// steps are clocked by a gated ring oscillator that runs faster than the
// machine clock, so several steps fit in one machine cycle.
//
// Here the steps are counted against the machine clock instead: a step
// takes STEP_NS and a machine cycle lasts CYCLE_NS, so each cycle performs as
// many steps as the time banked so far allows (at most ceil(CYCLE_NS/STEP_NS)),
// and the remainder of the cycle is carried into the next. With the default
// 33 ns cycle and 10 ns step (320 ns for the 32 stages in the worst case), a
// shift by n completes in max(1, ceil(10*n/33)) machine cycles: 10 cycles for
// a shift by 31. The oscillator itself is not modelled; this time budget and
// the step loop stand in for it, which is this design's own choice.
//
// The register only shifts towards bit 0. Left shifts load the operand bit
// reversed and reverse the result again; an arithmetic right shift feeds the
// sign bit in at the top, the logical shifts feed zeros (own choice).
//
// Interface: assert start for one cycle with din, amount and op valid. dout
// is valid in the cycle in which done is high, which is the start cycle
// itself if the whole shift fits in it. go is high while a shift is still in
// progress after its first cycle. start must not be asserted while go is high.
module linear_shifter
  import dlx_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned CYCLE_NS = 33,
  parameter int unsigned STEP_NS  = 10,
  localparam int unsigned K = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] din,
  input  logic [K-1:0] amount,
  input  shift_op_e    op,
  output logic [N-1:0] dout,
  output logic         done,
  output logic         go
);

  localparam int unsigned MAX_STEPS = (CYCLE_NS + STEP_NS - 1) / STEP_NS;
  localparam int unsigned BW        = $clog2(CYCLE_NS + STEP_NS + 1) + 1;

  function automatic logic [N-1:0] reverse(input logic [N-1:0] x);
    for (int i = 0; i < N; i++) reverse[i] = x[N-1-i];
  endfunction

  // Shift register, step counter and banked time
  logic [N-1:0]  sreg;
  logic [K-1:0]  count;
  logic [BW-1:0] credit;
  logic          running;
  logic          left_q, fill_q;

  logic          left, fill;
  logic [N-1:0]  cur;
  logic [K-1:0]  rem;
  logic [BW-1:0] budget;

  assign left = start ? (op == SH_SLL) : left_q;
  assign fill = start ? ((op == SH_SRA) & din[N-1]) : fill_q;

  always_comb begin
    cur    = start ? ((op == SH_SLL) ? reverse(din) : din) : sreg;
    rem    = start ? amount : count;
    budget = (start ? BW'(0) : credit) + BW'(CYCLE_NS);
    for (int k = 0; k < MAX_STEPS; k++) begin
      if (rem != '0 && budget >= BW'(STEP_NS)) begin
        cur    = {fill, cur[N-1:1]};
        rem    = rem - 1'b1;
        budget = budget - BW'(STEP_NS);
      end
    end
  end

  assign done = (start || running) && (rem == '0);
  assign dout = left ? reverse(cur) : cur;
  assign go   = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg    <= '0;
      count   <= '0;
      credit  <= '0;
      running <= 1'b0;
      left_q  <= 1'b0;
      fill_q  <= 1'b0;
    end else if (start || running) begin
      sreg    <= cur;
      count   <= rem;
      credit  <= (rem == '0) ? '0 : budget;
      running <= (rem != '0);
      left_q  <= left;
      fill_q  <= fill;
    end
  end

  // A new shift may only begin once the previous one has finished
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !running)
    else $error("linear_shifter: start while a shift is in progress");

endmodule
