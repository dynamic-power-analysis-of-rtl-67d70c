// tb_dwt_datapath: presents a new random window (and a few extreme ones)
// every clock with the coefficient registers set to the design's values,
// and checks each result exactly PIPE = 8 clocks later against the per-tap
// form of the equations:
//   a = 294 * (186*x0 + 85*(x-1+x1) - 27*(x-2+x2) - 5*(x-3+x3) + 8*(x-4+x4))
//   d = 232*x1 - 123*(x0+x2) - 12*(x-1+x3) + 19*(x-2+x4)
// A second phase loads a different coefficient set to confirm that the
// multipliers take their weights from the registers.
module tb_dwt_datapath;
  import dwt_pkg::*;

  localparam int LAT = 8;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [7:0] taps [TAPS];
  coef_t coef [NCOEF];
  logic signed [29:0] a_out;
  logic signed [19:0] d_out;

  dwt_datapath dut (.*);

  always #5 clk = ~clk;

  typedef struct { longint a; longint d; } exp_t;
  exp_t q[$];

  // generic reference for any coefficient set, from the sample groups
  function automatic exp_t model(input int w[9], input int c[8]);
    exp_t r;
    longint p, qq, e, rr, s, t, u, inner;
    p  = w[0] + 4 * w[2] + 6 * w[4] + 4 * w[6] + w[8];
    qq = w[1] + 3 * w[3] + 3 * w[5] + w[7];
    e  = w[2] + 2 * w[4] + w[6];
    rr = w[3] + w[5];
    s  = w[2] + 3 * w[4] + 3 * w[6] + w[8];
    t  = w[3] + 2 * w[5] + w[7];
    u  = w[4] + w[6];
    inner = 256 * w[4] + c[0] * p + c[1] * qq + c[2] * e + c[3] * rr;
    r.a = longint'(c[4]) * inner;
    r.d = 256 * w[5] + c[5] * s + c[6] * t + c[7] * u;
    return r;
  endfunction

  int cset [8];

  initial begin
    int def_c [8];
    def_c = '{8, -5, -59, 100, 294, 19, -12, -180};
    for (int phase = 0; phase < 2; phase++) begin
      for (int i = 0; i < 8; i++)
        cset[i] = (phase == 0) ? def_c[i] : $urandom_range(60) - 30;
      for (int i = 0; i < 8; i++) coef[i] = coef_t'(cset[i]);
      q.delete();
      for (int n = 0; n < 300 + LAT; n++) begin
        int w[9];
        for (int t = 0; t < 9; t++) begin
          case (n)
            0: w[t] = 255;
            1: w[t] = (t % 2 == 0) ? 255 : 0;
            2: w[t] = (t % 2 == 0) ? 0 : 255;
            3: w[t] = 0;
            default: w[t] = $urandom_range(255);
          endcase
          taps[t] = 8'(w[t]);
        end
        // the per-tap form (default set) must agree with the grouped model
        if (phase == 0) begin
          exp_t g;
          longint ta;
          g  = model(w, cset);
          ta = 294 * (186 * w[4] + 85 * (w[3] + w[5]) - 27 * (w[2] + w[6])
                      - 5 * (w[1] + w[7]) + 8 * (w[0] + w[8]));
          checks++;
          if (g.a != ta || g.d != 232 * w[5] - 123 * (w[4] + w[6]) - 12 * (w[3] + w[7])
                                   + 19 * (w[2] + w[8])) begin
            failures++;
            $display("FAIL: reference forms disagree");
          end
        end
        q.push_back(model(w, cset));
        @(negedge clk);
        // the window set before edge 1 is checked after edge LAT
        if (q.size() >= LAT) begin
          exp_t ex;
          ex = q.pop_front();
          checks++;
          if (longint'(a_out) != ex.a || longint'(d_out) != ex.d) begin
            failures++;
            $display("FAIL: phase %0d step %0d: a=%0d d=%0d, expected a=%0d d=%0d",
                     phase, n, a_out, d_out, ex.a, ex.d);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
