// dwt_datapath: pipelined adders and multipliers of the modified lifting DWT.
//
// From one full window X-4..X+4 (x[2i-4]..x[2i+4]) it computes, with no
// dependence on earlier outputs,
//   a_i = Z * ( 256*x0 + cP*P + cQ*Q + cE*E + cR*R )
//   d_i =       256*x1 + cS*S + cT*T + cU*U
// where P, Q, E, R, S, T, U are the sample groups listed in dwt_pkg and the
// c* and Z are the coefficient registers (8, -5, -59, 100, 19, -12, -180 and
// 294 after loading). Sample groups shared between a and d (x-2+x2, x0+x2,
// x-1+x1 ...) are formed once and reused.
//
// Every addition is a csel_adder and every multiplication a wallace_mult;
// the small constant weights inside the groups (2, 3, 4, 6) are shifts and
// additions. A register follows every level of operators:
//   S1  pairwise sums of taps                  (7 adders)
//   S2  first group terms                      (6 adders)
//   S3  complete groups P, Q, S                (3 adders)
//   S4  group x coefficient                    (7 multipliers)
//   S5  partial sums, d adds 256*x1            (4 adders)
//   S6  sums of a and of d                     (2 adders)
//   S7  a adds 256*x0                          (1 adder)
//   S8  a times Z; d is only delayed           (1 multiplier)
// so a window presented before a clock edge gives its a_out/d_out eight
// edges later (PIPE = 8), one new result every clock.
//
// Samples are unsigned 8-bit. Sums run in ACC_W = 20-bit two's complement,
// which holds the unscaled a (|.| <= 860*255) and d (|.| <= 816*255);
// a_out has ACC_W+COEF_W = 30 bits. The equations follow the design
// description; the grouping into pipeline stages and all widths are this
// design's choice. Registers are not reset: the control unit's valid
// pipeline marks which results are meaningful.
module dwt_datapath
  import dwt_pkg::*;
(
  input  logic                           clk,
  input  logic [SAMPLE_W-1:0]            taps [TAPS],  // X-4 .. X+4
  input  coef_t                          coef [NCOEF],
  output logic signed [ACC_W+COEF_W-1:0] a_out,
  output logic signed [ACC_W-1:0]        d_out
);

  typedef logic signed [ACC_W-1:0] acc_t;
  localparam int unsigned PW = ACC_W + COEF_W;

  // taps widened to the accumulator width, index k = offset k-4
  acc_t x [TAPS];
  always_comb for (int k = 0; k < int'(TAPS); k++) x[k] = acc_t'(taps[k]);

  // ---------------- S1: pairwise sums ----------------
  localparam int N1 = 7;
  acc_t a1 [N1], b1 [N1], y1 [N1];
  always_comb begin
    a1[0] = x[0]; b1[0] = x[8];   // x-4 + x4
    a1[1] = x[2]; b1[1] = x[6];   // x-2 + x2
    a1[2] = x[1]; b1[2] = x[7];   // x-3 + x3
    a1[3] = x[3]; b1[3] = x[5];   // x-1 + x1   (R)
    a1[4] = x[4]; b1[4] = x[6];   // x0  + x2   (U)
    a1[5] = x[3]; b1[5] = x[7];   // x-1 + x3
    a1[6] = x[2]; b1[6] = x[8];   // x-2 + x4
  end
  for (genvar k = 0; k < N1; k++) begin : g_s1
    logic co;
    csel_adder #(.WIDTH(ACC_W)) u_add (.a(a1[k]), .b(b1[k]), .cin(1'b0), .sum(y1[k]), .cout(co));
  end

  acc_t s44, s22, s33, r1, u1, t1, v1, x0_1, x1_1;
  always_ff @(posedge clk) begin
    s44 <= y1[0]; s22 <= y1[1]; s33 <= y1[2]; r1 <= y1[3];
    u1  <= y1[4]; t1  <= y1[5]; v1  <= y1[6];
    x0_1 <= x[4]; x1_1 <= x[5];
  end

  // ---------------- S2: first group terms ----------------
  localparam int N2 = 6;
  acc_t a2 [N2], b2 [N2], y2 [N2];
  always_comb begin
    a2[0] = s22; b2[0] = x0_1 <<< 1;                // E  = x-2 + 2x0 + x2
    a2[1] = s44; b2[1] = s22 <<< 2;                 // Pa = x-4 + x4 + 4(x-2 + x2)
    a2[2] = x0_1 <<< 2; b2[2] = x0_1 <<< 1;         // 6x0
    a2[3] = s33; b2[3] = r1 <<< 1;                  // Qa = x-3 + x3 + 2(x-1 + x1)
    a2[4] = t1;  b2[4] = x1_1 <<< 1;                // T  = x-1 + 2x1 + x3
    a2[5] = v1;  b2[5] = u1 <<< 1;                  // Sa = x-2 + x4 + 2(x0 + x2)
  end
  for (genvar k = 0; k < N2; k++) begin : g_s2
    logic co;
    csel_adder #(.WIDTH(ACC_W)) u_add (.a(a2[k]), .b(b2[k]), .cin(1'b0), .sum(y2[k]), .cout(co));
  end

  acc_t e2, pa2, p62, qa2, t2, sa2, r2, u2, x0_2, x1_2;
  always_ff @(posedge clk) begin
    e2 <= y2[0]; pa2 <= y2[1]; p62 <= y2[2]; qa2 <= y2[3]; t2 <= y2[4]; sa2 <= y2[5];
    r2 <= r1; u2 <= u1; x0_2 <= x0_1; x1_2 <= x1_1;
  end

  // ---------------- S3: complete groups ----------------
  localparam int N3 = 3;
  acc_t a3 [N3], b3 [N3], y3 [N3];
  always_comb begin
    a3[0] = pa2; b3[0] = p62;   // P = x-4 + 4x-2 + 6x0 + 4x2 + x4
    a3[1] = qa2; b3[1] = r2;    // Q = x-3 + 3x-1 + 3x1 + x3
    a3[2] = sa2; b3[2] = u2;    // S = x-2 + 3x0 + 3x2 + x4
  end
  for (genvar k = 0; k < N3; k++) begin : g_s3
    logic co;
    csel_adder #(.WIDTH(ACC_W)) u_add (.a(a3[k]), .b(b3[k]), .cin(1'b0), .sum(y3[k]), .cout(co));
  end

  acc_t p3, q3, s3, e3, r3, t3, u3, x0_3, x1_3;
  always_ff @(posedge clk) begin
    p3 <= y3[0]; q3 <= y3[1]; s3 <= y3[2];
    e3 <= e2; r3 <= r2; t3 <= t2; u3 <= u2; x0_3 <= x0_2; x1_3 <= x1_2;
  end

  // ---------------- S4: group x coefficient ----------------
  localparam int N4 = 7;
  acc_t  m_in [N4];
  coef_t m_c  [N4];
  logic signed [PW-1:0] m_y [N4];
  always_comb begin
    m_in[0] = p3; m_c[0] = coef[C_P];
    m_in[1] = q3; m_c[1] = coef[C_Q];
    m_in[2] = e3; m_c[2] = coef[C_E];
    m_in[3] = r3; m_c[3] = coef[C_R];
    m_in[4] = s3; m_c[4] = coef[C_S];
    m_in[5] = t3; m_c[5] = coef[C_T];
    m_in[6] = u3; m_c[6] = coef[C_U];
  end
  for (genvar k = 0; k < N4; k++) begin : g_s4
    wallace_mult #(.WA(ACC_W), .WB(COEF_W)) u_mul (.a(m_in[k]), .b(m_c[k]), .p(m_y[k]));
  end

  // products fit in ACC_W bits (largest is 180*510); keep the low bits
  acc_t mp4, mq4, me4, mr4, ms4, mt4, mu4, x0_4, x1_4;
  always_ff @(posedge clk) begin
    mp4 <= acc_t'(m_y[0]); mq4 <= acc_t'(m_y[1]); me4 <= acc_t'(m_y[2]);
    mr4 <= acc_t'(m_y[3]); ms4 <= acc_t'(m_y[4]); mt4 <= acc_t'(m_y[5]);
    mu4 <= acc_t'(m_y[6]);
    x0_4 <= x0_3; x1_4 <= x1_3;
  end

  // ---------------- S5: partial sums ----------------
  localparam int N5 = 4;
  acc_t a5 [N5], b5 [N5], y5 [N5];
  always_comb begin
    a5[0] = mp4; b5[0] = mq4;            // a: P and Q terms
    a5[1] = me4; b5[1] = mr4;            // a: E and R terms
    a5[2] = ms4; b5[2] = mt4;            // d: S and T terms
    a5[3] = mu4; b5[3] = x1_4 <<< 8;     // d: U term and 256*x1
  end
  for (genvar k = 0; k < N5; k++) begin : g_s5
    logic co;
    csel_adder #(.WIDTH(ACC_W)) u_add (.a(a5[k]), .b(b5[k]), .cin(1'b0), .sum(y5[k]), .cout(co));
  end

  acc_t pa5, pb5, da5, db5, x0_5;
  always_ff @(posedge clk) begin
    pa5 <= y5[0]; pb5 <= y5[1]; da5 <= y5[2]; db5 <= y5[3]; x0_5 <= x0_4;
  end

  // ---------------- S6: sums of a and of d ----------------
  acc_t y6a, y6d;
  logic co6a, co6d;
  csel_adder #(.WIDTH(ACC_W)) u_add6a (.a(pa5), .b(pb5), .cin(1'b0), .sum(y6a), .cout(co6a));
  csel_adder #(.WIDTH(ACC_W)) u_add6d (.a(da5), .b(db5), .cin(1'b0), .sum(y6d), .cout(co6d));

  acc_t as6, d6, x0_6;
  always_ff @(posedge clk) begin
    as6 <= y6a; d6 <= y6d; x0_6 <= x0_5;
  end

  // ---------------- S7: a adds 256*x0 ----------------
  acc_t y7;
  logic co7;
  csel_adder #(.WIDTH(ACC_W)) u_add7 (.a(as6), .b(x0_6 <<< 8), .cin(1'b0), .sum(y7), .cout(co7));

  acc_t a7, d7;
  always_ff @(posedge clk) begin
    a7 <= y7; d7 <= d6;
  end

  // ---------------- S8: final scaling of a ----------------
  logic signed [PW-1:0] y8;
  wallace_mult #(.WA(ACC_W), .WB(COEF_W)) u_mul8 (.a(a7), .b(coef[C_ZETA]), .p(y8));

  always_ff @(posedge clk) begin
    a_out <= y8;
    d_out <= d7;
  end

endmodule
