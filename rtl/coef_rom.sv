// coef_rom: read-only memory of the scaled lifting coefficients.
//
// Holds the eight integer coefficients of the modified lifting equations (see
// dwt_pkg for how each is derived from alpha..zeta, scaled by 256 and
// rounded). The read is synchronous: the word at addr appears on data one
// clock after addr is presented. The control unit reads every word once after
// reset and keeps it in registers, so the memory is idle while data streams.
// Storing the coefficients in a memory follows the design description; the
// synchronous read and the address order are this design's choice.
module coef_rom
  import dwt_pkg::*;
(
  input  logic      clk,
  input  coef_idx_e addr,
  output coef_t     data
);

  coef_t mem [NCOEF];

  always_comb begin
    for (int i = 0; i < int'(NCOEF); i++) mem[i] = coef_value(coef_idx_e'(i));
  end

  always_ff @(posedge clk) data <= mem[addr];

endmodule
