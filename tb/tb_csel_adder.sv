// tb_csel_adder: checks the carry select adder against the + operator.
// Runs the default 16-bit adder with 4-bit blocks and a 13-bit adder with
// 5-bit blocks (shorter top block): carry chains through every block
// (all-ones plus one), the extremes, and random operands with both carry-in
// values. Sum and carry out are compared.
module tb_csel_adder;

  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  logic [12:0] a13, b13, s13;
  logic        ci13, co13;

  csel_adder                          dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  csel_adder #(.WIDTH(13), .BLOCK(5)) dut13 (.a(a13), .b(b13), .cin(ci13), .sum(s13), .cout(co13));

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] ref_v;
    a16 = x; b16 = y; ci16 = c;
    #1;
    ref_v = {1'b0, x} + {1'b0, y} + 17'(c);
    checks++;
    if ({co16, s16} !== ref_v) begin
      failures++;
      $display("FAIL 16: %h + %h + %b = %h, expected %h", x, y, c, {co16, s16}, ref_v);
    end
  endtask

  task automatic check13(input logic [12:0] x, input logic [12:0] y, input logic c);
    logic [13:0] ref_v;
    a13 = x; b13 = y; ci13 = c;
    #1;
    ref_v = {1'b0, x} + {1'b0, y} + 14'(c);
    checks++;
    if ({co13, s13} !== ref_v) begin
      failures++;
      $display("FAIL 13: %h + %h + %b = %h, expected %h", x, y, c, {co13, s13}, ref_v);
    end
  endtask

  initial begin
    check16(16'hFFFF, 16'h0001, 1'b0);
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'h0FFF, 16'h0001, 1'b0);
    check16(16'h8000, 16'h8000, 1'b0);
    check13(13'h1FFF, 13'h0001, 1'b0);
    check13(13'h1FFF, 13'h1FFF, 1'b1);
    for (int i = 0; i < 2000; i++) begin
      check16(16'($urandom), 16'($urandom), 1'($urandom));
      check13(13'($urandom), 13'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
