// tb_execute_unit: self-checking test of execute_unit with the barrel
// shifter (ripple carry ALU) and with the linear shifter (parallel prefix
// ALU, 33 ns cycle). Random ALU operations must complete in one cycle on
// both; shifts complete in one cycle on the barrel version and in
// max(1, ceil(10*n/33)) cycles on the linear version, with shift_go high
// while the shift continues; a link operation puts the link address on the
// result bus. Results are compared with SystemVerilog operators.
module tb_execute_unit;
  import dlx_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] a, b, link_addr, rb, rl;
  alu_op_e     alu_op;
  logic        is_shift, shift_start, link;
  shift_op_e   shift_op;
  logic        db, dl, zb, zl, ob, ol, gb, gl;
  int checks = 0, failures = 0;

  execute_unit #(.ADDER_KIND(ADDER_RIPPLE), .SHIFTER_KIND(SHIFTER_BARREL)) u_b (
    .clk, .rst_n, .a, .b, .alu_op, .is_shift, .shift_op, .shift_start, .link, .link_addr,
    .result(rb), .done(db), .a_zero(zb), .overflow(ob), .shift_go(gb));
  execute_unit u_l (
    .clk, .rst_n, .a, .b, .alu_op, .is_shift, .shift_op, .shift_start, .link, .link_addr,
    .result(rl), .done(dl), .a_zero(zl), .overflow(ol), .shift_go(gl));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; link_addr = 0; alu_op = ALU_ADD; is_shift = 0; shift_start = 0; link = 0; shift_op = SH_SLL;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      automatic int k = int'($urandom % 3);
      @(negedge clk);
      a = $urandom; b = $urandom; link_addr = $urandom; link = 0; is_shift = 0; shift_start = 0;
      if (k == 0) begin
        alu_op = (n % 2) ? ALU_ADD : ALU_XOR;
        #1;
        check(rb == ((n % 2) ? a + b : a ^ b) && rl == rb && db && dl, "alu op");
        check(zb == (a == 0) && zl == (a == 0), "zero flag");
      end else if (k == 1) begin
        link = 1; alu_op = ALU_PASSB;
        #1;
        check(rb == link_addr && rl == link_addr && db && dl, "link");
      end else begin
        logic [31:0] e;
        int amt, cyc, want;
        amt = int'(b[4:0]);
        shift_op = shift_op_e'($urandom % 3);
        e = (shift_op == SH_SLL) ? a << amt : (shift_op == SH_SRL) ? a >> amt : 32'($signed(a) >>> amt);
        want = (amt * 10 + 32) / 33; if (want < 1) want = 1;
        is_shift = 1; shift_start = 1;
        #1;
        check(db && rb == e, "barrel shift in one cycle");
        cyc = 1;
        while (!dl && cyc < 20) begin
          @(negedge clk); shift_start = 0; cyc++;
          #1;
          check(gl, "shift_go while shifting");
        end
        check(rl == e, $sformatf("linear shift result %h exp %h", rl, e));
        check(cyc == want, $sformatf("linear shift by %0d took %0d cycles, exp %0d", amt, cyc, want));
        // let a shift that was reported done too early run out before the next operation
        @(negedge clk); shift_start = 0; #1;
        while (gl && cyc < 40) begin @(negedge clk); cyc++; #1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
