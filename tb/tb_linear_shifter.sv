// tb_linear_shifter: self-checking test of linear_shifter.
//
// Two instances: the default (33 ns machine cycle, 10 ns per step) and one
// with a 66 ns cycle. For each shift (random operand, amount and kind, plus
// every amount 0..31) start is pulsed, the cycles until done are counted and
// compared with max(1, ceil(amount*STEP/CYCLE)) - a 31-bit shift takes 10
// cycles at 33 ns and 5 at 66 ns - and the result is compared with the
// SystemVerilog shift operators. go must be high exactly in the cycles after
// the first one while the shift is still running.
module tb_linear_shifter;
  import dlx_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start;
  logic [31:0] din, d33, d66;
  logic [4:0]  amount;
  shift_op_e   op;
  logic        done33, done66, go33, go66;
  int checks = 0, failures = 0;

  linear_shifter                           u_33 (.clk, .rst_n, .start, .din, .amount, .op, .dout(d33), .done(done33), .go(go33));
  linear_shifter #(.CYCLE_NS(66))          u_66 (.clk, .rst_n, .start, .din, .amount, .op, .dout(d66), .done(done66), .go(go66));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic run(logic [31:0] x, int n, int o);
    logic [31:0] e;
    int c33, c66, exp33, exp66;
    bit f33, f66;
    e = (o == 0) ? x << n : (o == 1) ? x >> n : 32'($signed(x) >>> n);
    exp33 = (n * 10 + 32) / 33; if (exp33 < 1) exp33 = 1;
    exp66 = (n * 10 + 65) / 66; if (exp66 < 1) exp66 = 1;
    @(negedge clk);
    din = x; amount = 5'(n); op = shift_op_e'(o); start = 1'b1;
    c33 = 0; c66 = 0; f33 = 0; f66 = 0;
    for (int cyc = 1; cyc <= 12; cyc++) begin
      #1;
      if (cyc > 1) begin
        check(go33 == !f33, $sformatf("go33 cycle %0d", cyc));
      end
      if (done33 && !f33) begin f33 = 1; c33 = cyc; check(d33 == e, $sformatf("33ns %0d %h>%0d = %h exp %h", o, x, n, d33, e)); end
      if (done66 && !f66) begin f66 = 1; c66 = cyc; check(d66 == e, $sformatf("66ns %0d %h>%0d = %h exp %h", o, x, n, d66, e)); end
      @(negedge clk);
      start = 1'b0;
      din = $urandom;      // operand may change once the shift has started
      if (f33 && f66) break;
    end
    check(c33 == exp33, $sformatf("33ns cycles for %0d: %0d exp %0d", n, c33, exp33));
    check(c66 == exp66, $sformatf("66ns cycles for %0d: %0d exp %0d", n, c66, exp66));
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0; din = '0; amount = '0; op = SH_SLL;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 32; n++) for (int o = 0; o < 3; o++) run(32'h8765_4321, n, o);
    for (int k = 0; k < 100; k++) run($urandom, int'($urandom % 32), int'($urandom % 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
