// tb_dwt1d_top: end-to-end test of the modified-lifting 1D DWT.
//
// Streams NROWS rows of random 8-bit samples (with one all-255 row and two
// alternating 0/255 rows to reach the extremes) as even/odd pairs, with random
// idle cycles between pairs, and the first pair of each row flagged.
// For every accepted pair that completes a window the testbench computes the
// expected outputs itself from the sample history, using the per-tap weights
// of the equations (a different arrangement from the RTL's grouping):
//   inner a = 186*x0 + 85*(x-1+x1) - 27*(x-2+x2) - 5*(x-3+x3) + 8*(x-4+x4)
//   a       = 294 * inner a
//   d       = 232*x1 - 123*(x0+x2) - 12*(x-1+x3) + 19*(x-2+x4)
// and checks value and arrival cycle (8 clocks after the pair was taken).
// It also runs the textbook floating-point lifting steps on the same window
// and checks that out_a/65536 and out_d/256 stay within 12 and 2 sample
// units of them (the integer weights are rounded to 1/256).
// Counted mechanisms, each of which must occur: coefficient loading
// (in_ready low for 10 clocks after reset), idle input cycles, row restarts,
// pairs that only fill the window, and valid outputs.
// The top is used with its default parameters.
module tb_dwt1d_top;
  import dwt_pkg::*;

  localparam int ROW_PAIRS = 16;
  localparam int NROWS     = 10;
  localparam int LAT       = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_first = 1'b0;
  logic [7:0] in_even = '0, in_odd = '0;
  logic in_ready, out_valid;
  logic signed [29:0] out_a;
  logic signed [19:0] out_d;

  dwt1d_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected results
  typedef struct { longint a; longint d; int due; real fa; real fd; } exp_t;
  exp_t q[$];

  int n_load = 0, n_idle = 0, n_restart = 0, n_fill = 0, n_out = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cyc, msg);
  endtask

  // ideal 9/7 lifting on a 9-sample window w[0..8] = x[2i-4]..x[2i+4]
  function automatic void lifting(input int w[9], output real fa, output real fd);
    real al, be, ga, de, ze;
    real d1[4], a1[3], d2[2], a2;
    al = -1.58613; be = -0.0529; ga = 0.882911; de = 0.44350; ze = 1.1496;
    // d1 at offsets -3,-1,+1,+3
    for (int k = 0; k < 4; k++) d1[k] = w[2*k+1] + al * (w[2*k] + w[2*k+2]);
    // a1 at offsets -2,0,+2
    for (int k = 0; k < 3; k++) a1[k] = w[2*k+2] + be * (d1[k] + d1[k+1]);
    // d2 at offsets -1,+1
    for (int k = 0; k < 2; k++) d2[k] = d1[k+1] + ga * (a1[k] + a1[k+1]);
    a2 = a1[1] + de * (d2[0] + d2[1]);
    fa = ze * a2;
    fd = d2[1];
  endfunction

  // reference model: watches the input port at every rising edge and
  // predicts the outputs of each accepted pair that completes a window
  int hist[$];          // samples of the current row
  int mfill = 0;
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      if (in_first) begin
        hist.delete();
        mfill = 0;
      end
      hist.push_back(int'(in_even));
      hist.push_back(int'(in_odd));
      mfill++;
      if (mfill >= 5) begin
        exp_t ex;
        int w[9];
        longint ia;
        int c;
        c = hist.size() - 6;   // index of x0: pair k gives x0 = x[2k-4]
        for (int t = 0; t < 9; t++) w[t] = hist[c - 4 + t];
        ia = 186 * w[4] + 85 * (w[3] + w[5]) - 27 * (w[2] + w[6])
             - 5 * (w[1] + w[7]) + 8 * (w[0] + w[8]);
        ex.a = 294 * ia;
        ex.d = 232 * w[5] - 123 * (w[4] + w[6]) - 12 * (w[3] + w[7]) + 19 * (w[2] + w[8]);
        // taken on edge cyc, registered on edge cyc+LAT, seen by the
        // monitor on the edge after that
        ex.due = cyc + LAT + 1;
        lifting(w, ex.fa, ex.fd);
        q.push_back(ex);
      end else begin
        n_fill++;
      end
    end
  end

  // driver: changes inputs on falling edges only
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // coefficient loading: in_ready must stay low 10 clocks, then rise
    begin
      int lo;
      lo = 0;   // rising edges seen with in_ready low since reset was released
      while (!in_ready && lo < 50) begin @(negedge clk); lo++; end
      checks++;
      if (lo != NCOEF + 2) fail($sformatf("in_ready rose after %0d clocks, expected %0d", lo, NCOEF + 2));
      else n_load++;
    end
    for (int r = 0; r < NROWS; r++) begin
      for (int k = 0; k < ROW_PAIRS; k++) begin
        int e, o;
        case (r)
          1: begin e = 255; o = 255; end
          2: begin e = 0;   o = 255; end
          3: begin e = 255; o = 0;   end
          default: begin e = $urandom_range(255); o = $urandom_range(255); end
        endcase
        // random idle cycles
        while ($urandom_range(3) == 0) begin
          in_valid = 1'b0;
          n_idle++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_first = (k == 0);
        in_even  = 8'(e);
        in_odd   = 8'(o);
        if (k == 0 && r > 0) n_restart++;
        @(negedge clk);
        checks++;
        if (!in_ready) fail("in_ready dropped while streaming");
      end
    end
    in_valid = 1'b0;
    in_first = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (q.size() != 0) fail($sformatf("%0d expected outputs never came", q.size()));
    checks++;
    if (n_load == 0)    fail("coefficient loading never observed");
    checks++;
    if (n_idle == 0)    fail("no idle input cycle");
    checks++;
    if (n_restart == 0) fail("no row restart");
    checks++;
    if (n_fill == 0)    fail("no window-fill pair");
    checks++;
    if (n_out == 0)     fail("no output");
    $display("mechanisms: load=%0d idle=%0d restart=%0d fill=%0d out=%0d",
             n_load, n_idle, n_restart, n_fill, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  real max_ea = 0.0, max_ed = 0.0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      checks++;
      if (q.size() == 0) fail("unexpected output");
      else begin
        exp_t ex;
        real ea, ed;
        ex = q.pop_front();
        if (out_a != 30'(ex.a) || out_d != 20'(ex.d))
          fail($sformatf("a=%0d d=%0d, expected a=%0d d=%0d", out_a, out_d, ex.a, ex.d));
        checks++;
        if (cyc != ex.due) fail($sformatf("output at %0d, expected at %0d", cyc, ex.due));
        ea = $itor(out_a) / 65536.0 - ex.fa;
        ed = $itor(out_d) / 256.0 - ex.fd;
        if (ea < 0) ea = -ea;
        if (ed < 0) ed = -ed;
        if (ea > max_ea) max_ea = ea;
        if (ed > max_ed) max_ed = ed;
        checks++;
        if (ea > 12.0 || ed > 2.0)
          fail($sformatf("far from floating-point lifting: |da|=%f |dd|=%f", ea, ed));
      end
    end
  end

  final $display("largest deviation from floating-point lifting: a %f, d %f", max_ea, max_ed);

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
