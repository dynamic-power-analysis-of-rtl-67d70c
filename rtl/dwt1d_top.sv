// dwt1d_top: modified-lifting 9/7 one-dimensional DWT.
//
// Streams a row of 8-bit samples in as even/odd pairs, one pair per clock
// (in_even = x[2k], in_odd = x[2k+1]), and streams out one low-pass
// coefficient a and one high-pass coefficient d per clock. Because the
// lifting steps have been folded into direct sums over a 9-sample window,
// no output depends on an earlier output and the datapath is a plain
// feed-forward pipeline.
//
// Blocks: coef_rom (scaled coefficients), dwt_ctrl (coefficient loading,
// handshake, window fill and valid tracking), sipo_window (9-tap window
// X-4..X+4), a coefficient register file, and dwt_datapath (carry select
// adders and Wallace tree multipliers).
//
// Interface and timing:
//  - After reset in_ready stays low for NCOEF+2 = 10 clocks while the
//    coefficients are copied from the memory into registers, then stays high.
//  - A pair is taken on a clock edge with in_valid & in_ready. in_first marks
//    the first pair of a row and restarts the window fill. in_valid may drop
//    at any time; the pipeline simply carries invalid results meanwhile.
//  - Pair k of a row (k >= 4) completes the window centred on x[2k-4], and
//    a = out_a, d = out_d for index i = k-2 appear with out_valid high
//    PIPE = 8 clocks after the edge that took pair k. Pairs 0..3 of a row
//    produce no output (the window is not yet full); the edges of a row are
//    not extended.
//  - out_a is about 65536 * a (scale 256 on the lifting constants and 256 on
//    zeta) in 30 bits; out_d is about 256 * d in 20 bits (not divided by
//    zeta). Both are two's complement.
module dwt1d_top
  import dwt_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic                           in_first,
  input  logic [SAMPLE_W-1:0]            in_even,
  input  logic [SAMPLE_W-1:0]            in_odd,
  output logic                           in_ready,
  output logic                           out_valid,
  output logic signed [ACC_W+COEF_W-1:0] out_a,
  output logic signed [ACC_W-1:0]        out_d
);

  localparam int unsigned PIPE = 8;

  logic                shift, coef_we, win_valid;
  coef_idx_e           rom_addr, coef_waddr;
  coef_t               rom_data;
  coef_t               coef [NCOEF];
  logic [SAMPLE_W-1:0] taps [TAPS];

  dwt_ctrl #(.PIPE(PIPE)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_first  (in_first),
    .in_ready  (in_ready),
    .shift     (shift),
    .rom_addr  (rom_addr),
    .coef_we   (coef_we),
    .coef_waddr(coef_waddr),
    .win_valid (win_valid),
    .out_valid (out_valid)
  );

  coef_rom u_rom (
    .clk (clk),
    .addr(rom_addr),
    .data(rom_data)
  );

  // coefficient registers, written once during loading
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NCOEF); i++) coef[i] <= '0;
    end else if (coef_we) begin
      coef[coef_waddr] <= rom_data;
    end
  end

  sipo_window u_win (
    .clk    (clk),
    .rst_n  (rst_n),
    .shift  (shift),
    .in_even(in_even),
    .in_odd (in_odd),
    .taps   (taps)
  );

  dwt_datapath u_dp (
    .clk  (clk),
    .taps (taps),
    .coef (coef),
    .a_out(out_a),
    .d_out(out_d)
  );

  // the coefficients do not change once data is flowing
  a_coef_stable: assert property (@(posedge clk) disable iff (!rst_n) in_ready |-> !coef_we);
  // a result is only marked valid when a full window was behind it
  a_first_row: assert property (@(posedge clk) disable iff (!rst_n) win_valid |-> in_ready);

endmodule
