// sipo_window: serial-in parallel-out sample window X-4 .. X+4.
//
// Samples arrive in pairs, an even sample x[2k] and an odd sample x[2k+1] in
// the same clock. When shift is high the window moves two places: the even
// sample enters at X+4 and the odd sample of the previous pair, held one
// cycle in odd_hold, enters at X+3. After a shift with pair k the window
// therefore holds x[2k-8] (X-4) .. x[2k] (X+4), centred on the even sample
// x[2k-4] = X0, which is exactly what one low-pass output a and one
// high-pass output d need. The odd sample x[2k+1] is not needed until the
// next pair, hence the holding register.
//
// Interface: shift, in_even, in_odd in; taps[0..8] = X-4..X+4 out, all
// registered, updated on the clock edge at which shift is high. Reset clears
// the window to zero. The 9 taps of 8 bits are those of the design; feeding
// two samples per clock through a holding register is this design's choice.
module sipo_window
  import dwt_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift,
  input  logic [SAMPLE_W-1:0] in_even,
  input  logic [SAMPLE_W-1:0] in_odd,
  output logic [SAMPLE_W-1:0] taps [TAPS]
);

  logic [SAMPLE_W-1:0] odd_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_hold <= '0;
      for (int i = 0; i < int'(TAPS); i++) taps[i] <= '0;
    end else if (shift) begin
      for (int i = 0; i < int'(TAPS) - 2; i++) taps[i] <= taps[i+2];
      taps[TAPS-2] <= odd_hold;
      taps[TAPS-1] <= in_even;
      odd_hold     <= in_odd;
    end
  end

endmodule
