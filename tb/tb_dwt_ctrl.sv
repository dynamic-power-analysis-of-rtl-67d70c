// tb_dwt_ctrl: checks the control unit on its own.
//  - Loading: after reset the memory addresses 0..7 are presented on
//    consecutive clocks, each followed one clock later by a write strobe with
//    the same address; in_ready rises on the edge of the last write (10
//    clocks after reset) and the strobe never fires again.
//  - Streaming: random in_valid and in_first; a model counts the pairs of
//    the current row and predicts win_valid (window full: 5 or more pairs)
//    and out_valid (win_valid delayed by PIPE = 8 clocks). Counts how often
//    a row restart and a fill-only pair occurred.
module tb_dwt_ctrl;
  import dwt_pkg::*;

  localparam int PIPE = 8;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_first = 1'b0;
  logic in_ready, shift, coef_we, win_valid, out_valid;
  coef_idx_e rom_addr, coef_waddr;

  dwt_ctrl #(.PIPE(PIPE)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL: %s", msg);
  endtask

  logic wv_hist [$];
  int   fill = 0, n_restart = 0, n_fillonly = 0, n_out = 0;

  initial begin
    int prev_addr;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // loading sequence, sampled just before every rising edge
    prev_addr = -1;
    for (int n = 0; n < 12; n++) begin
      @(negedge clk);
      // n+1 rising edges have passed since reset was released
      if (n <= 7) begin
        checks++;
        if (int'(rom_addr) != n) fail($sformatf("clock %0d: address %0d, expected %0d", n, rom_addr, n));
      end
      if (n >= 1 && n <= 8) begin
        checks++;
        if (!coef_we || int'(coef_waddr) != n - 1)
          fail($sformatf("clock %0d: we=%0b waddr=%0d, expected write of %0d", n, coef_we, coef_waddr, n - 1));
      end else begin
        checks++;
        if (coef_we) fail($sformatf("clock %0d: unexpected write strobe", n));
      end
      checks++;
      if (in_ready != (n >= 9)) fail($sformatf("clock %0d: in_ready=%0b", n, in_ready));
    end
    // streaming
    for (int n = 0; n < 600; n++) begin
      in_valid = ($urandom_range(3) != 0);
      in_first = ($urandom_range(11) == 0);
      @(negedge clk);
      checks++;
      if (coef_we) fail("write strobe while streaming");
    end
    in_valid = 1'b0;
    repeat (PIPE + 2) @(negedge clk);
    checks++;
    if (n_restart == 0 || n_fillonly == 0 || n_out == 0)
      fail($sformatf("mechanism missing: restart=%0d fill-only=%0d out=%0d", n_restart, n_fillonly, n_out));
    $display("restart=%0d fill-only=%0d out=%0d", n_restart, n_fillonly, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of fill, win_valid and out_valid
  logic exp_wv = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (shift != (in_valid && in_ready)) fail("shift differs from in_valid & in_ready");
      checks++;
      if (win_valid != exp_wv) fail($sformatf("win_valid=%0b, expected %0b", win_valid, exp_wv));
      wv_hist.push_back(exp_wv);
      if (wv_hist.size() > PIPE) begin
        logic ov;
        ov = wv_hist.pop_front();
        checks++;
        if (out_valid != ov) fail($sformatf("out_valid=%0b, expected %0b", out_valid, ov));
        if (out_valid) n_out++;
      end
      exp_wv = 1'b0;
      if (in_valid && in_ready) begin
        if (in_first) begin
          if (fill >= 5) n_restart++;
          fill = 1;
        end else if (fill < 5) fill++;
        exp_wv = (fill >= 5);
        if (fill < 5) n_fillonly++;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
