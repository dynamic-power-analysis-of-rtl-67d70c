// tb_coef_rom: reads every address of the coefficient memory and checks the
// word one clock later against the integers of the modified lifting
// equations. Each expected value is also checked to lie within 1 of 256 times
// the product of lifting constants it stands for, computed here in floating
// point (alpha=-1.58613, beta=-0.0529, gamma=0.882911, delta=0.44350,
// zeta=1.1496); grouped weights are the sum of their separately scaled terms.
module tb_coef_rom;
  import dwt_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  coef_idx_e addr;
  coef_t data;

  coef_rom dut (.clk(clk), .addr(addr), .data(data));

  always #5 clk = ~clk;

  real al = -1.58613, be = -0.0529, ga = 0.882911, de = 0.44350, ze = 1.1496;
  int  expv [NCOEF];
  real ideal [NCOEF];

  initial begin
    // expected integers: terms rounded separately, then added
    expv[C_P] = 8;    ideal[C_P] = 256.0 * al * be * ga * de;
    expv[C_Q] = -5;   ideal[C_Q] = 256.0 * be * ga * de;
    expv[C_E] = 100 - 180 + 21;
    ideal[C_E] = 256.0 * (ga * de + al * de + al * be);
    expv[C_R] = 113 - 13;  ideal[C_R] = 256.0 * (de + be);
    expv[C_ZETA] = 294;    ideal[C_ZETA] = 256.0 * ze;
    expv[C_S] = 19;   ideal[C_S] = 256.0 * al * be * ga;
    expv[C_T] = -12;  ideal[C_T] = 256.0 * be * ga;
    expv[C_U] = 226 - 406; ideal[C_U] = 256.0 * (ga + al);
    for (int i = 0; i < int'(NCOEF); i++) begin
      real dv;
      dv = $itor(expv[i]) - ideal[i];
      checks++;
      if (dv > 1.0 || dv < -1.0) begin
        failures++;
        $display("FAIL: weight %0d = %0d is not 256x its constant (%f)", i, expv[i], ideal[i]);
      end
    end
    // read in a scrambled order, one address per clock
    for (int n = 0; n < 3 * int'(NCOEF); n++) begin
      int i;
      i = (n * 5 + 3) % NCOEF;
      @(negedge clk) addr = coef_idx_e'(i);
      @(negedge clk);
      checks++;
      if (int'(data) != expv[i]) begin
        failures++;
        $display("FAIL: addr %0d read %0d, expected %0d", i, data, expv[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
