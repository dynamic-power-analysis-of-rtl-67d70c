// tb_wallace_mult: checks the signed Wallace tree multiplier against the *
// operator. Runs the default 16x16 multiplier and the 20x10 shape used in
// the DWT datapath, with the extremes (most negative times most negative,
// -1, 0) and random signed operands.
module tb_wallace_mult;

  int checks = 0, failures = 0;

  logic signed [15:0] a16, b16;
  logic signed [31:0] p16;
  logic signed [19:0] a20;
  logic signed [9:0]  b10;
  logic signed [29:0] p30;

  wallace_mult                      dut16 (.a(a16), .b(b16), .p(p16));
  wallace_mult #(.WA(20), .WB(10)) dut20 (.a(a20), .b(b10), .p(p30));

  task automatic check16(input logic signed [15:0] x, input logic signed [15:0] y);
    longint ref_v;
    a16 = x; b16 = y;
    #1;
    ref_v = longint'(x) * longint'(y);
    checks++;
    if (longint'(p16) != ref_v) begin
      failures++;
      $display("FAIL 16x16: %0d * %0d = %0d, expected %0d", x, y, p16, ref_v);
    end
  endtask

  task automatic check20(input logic signed [19:0] x, input logic signed [9:0] y);
    longint ref_v;
    a20 = x; b10 = y;
    #1;
    ref_v = longint'(x) * longint'(y);
    checks++;
    if (longint'(p30) != ref_v) begin
      failures++;
      $display("FAIL 20x10: %0d * %0d = %0d, expected %0d", x, y, p30, ref_v);
    end
  endtask

  initial begin
    check16(-16'sd32768, -16'sd32768);
    check16(-16'sd32768, 16'sd32767);
    check16(16'sd32767, 16'sd32767);
    check16(-16'sd1, -16'sd1);
    check16(16'sd0, -16'sd5);
    check20(-20'sd524288, -10'sd512);
    check20(20'sd524287, -10'sd512);
    check20(20'sd219300, 10'sd294);
    check20(-20'sd1, 10'sd511);
    for (int i = 0; i < 2000; i++) begin
      check16(16'($urandom), 16'($urandom));
      check20(20'($urandom), 10'($urandom));
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
