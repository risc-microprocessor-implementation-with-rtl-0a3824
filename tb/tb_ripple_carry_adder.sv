// tb_ripple_carry_adder: self-checking test of ripple_carry_adder.
//
// Adds random and corner-case operand pairs with both carry-in values at
// the 32-bit default width, and exhaustively at 4 bits where the structure
// allows it, comparing sum and carry out with the integer sum computed in
// the testbench.
module tb_ripple_carry_adder;
  logic [31:0] a, b, s;
  logic        cin, cout;
  logic [3:0]  a4, b4, s4;
  logic        c4, co4;
  int checks = 0, failures = 0;

  ripple_carry_adder u_dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  ripple_carry_adder #(.N(4)) u_small (.a(a4), .b(b4), .cin(c4), .s(s4), .cout(co4));

  task automatic try(logic [31:0] x, logic [31:0] y, logic c);
    logic [32:0] e;
    a = x; b = y; cin = c;
    #1;
    e = {1'b0, x} + {1'b0, y} + {32'b0, c};
    checks++;
    if ({cout, s} !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %0d = %0d_%h, expected %h", x, y, c, cout, s, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int c = 0; c < 2; c++) begin
          logic [4:0] e;
          a4 = 4'(i); b4 = 4'(j); c4 = 1'(c);
          #1;
          e = 5'(i + j + c);
          checks++;
          if ({co4, s4} !== e) begin
            failures++;
            if (failures < 10) $display("FAIL 4-bit %0d+%0d+%0d", i, j, c);
          end
        end
    try('0, '0, 0);
    try('1, 32'd1, 0);
    try('1, '0, 1);
    try(32'h7FFF_FFFF, 32'd1, 0);
    try(32'h00FF_00FF, 32'h0001_0001, 1);
    try(32'h0000_00FF, 32'h0000_0001, 0);
    try(32'h0000_FFFF, 32'h0000_0000, 1);
    for (int k = 0; k < 32; k++) try(32'd1 << k, '1 << k, 0);
    for (int n = 0; n < 3000; n++) try($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
