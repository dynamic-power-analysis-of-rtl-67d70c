// tb_sipo_window: drives random sample pairs with random shift enables and
// checks after every clock that the nine taps hold x[2k-8] .. x[2k] of the
// last pair k shifted in (zeros before there were enough samples), and that
// the window stands still when shift is low.
module tb_sipo_window;
  import dwt_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0;
  logic [7:0] in_even = '0, in_odd = '0;
  logic [7:0] taps [TAPS];

  sipo_window dut (.*);

  always #5 clk = ~clk;

  int stream[$];   // x[0], x[1], ... of the pairs shifted in
  int n_hold = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      shift   = ($urandom_range(3) != 0);
      in_even = 8'($urandom);
      in_odd  = 8'($urandom);
      @(posedge clk);
      if (shift) begin
        stream.push_back(int'(in_even));
        stream.push_back(int'(in_odd));
      end else n_hold++;
      @(negedge clk);
      // newest even sample is x[2k] = stream[size-2]
      for (int t = 0; t < int'(TAPS); t++) begin
        int idx, expv;
        idx  = stream.size() - 2 - (int'(TAPS) - 1) + t;
        expv = (idx >= 0) ? stream[idx] : 0;
        checks++;
        if (int'(taps[t]) != expv) begin
          failures++;
          $display("FAIL: step %0d tap %0d = %0d, expected %0d", n, t, taps[t], expv);
        end
      end
    end
    checks++;
    if (n_hold == 0) begin failures++; $display("FAIL: shift was never low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
