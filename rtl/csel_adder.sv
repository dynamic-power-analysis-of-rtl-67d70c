// csel_adder: carry select adder.
//
// The operands are cut into blocks of BLOCK bits. The lowest block is a plain
// ripple-carry adder. Every higher block is built twice, once assuming a carry
// in of 0 and once assuming 1, and both copies work in parallel; when the real
// carry from the block below arrives it only selects one of the two
// precomputed results (sum and carry out). The carry therefore passes each
// block through one multiplexer instead of BLOCK full adders.
//
// Interface: a, b, cin -> sum, cout. Purely combinational, no clock.
// WIDTH defaults to 16 bits, the adder size the design compares; the block
// size of 4 bits and the uniform block length are this design's choice.
// WIDTH need not be a multiple of BLOCK: the top block is then shorter.
module csel_adder #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NBLK = (WIDTH + BLOCK - 1) / BLOCK;

  // carry into each block; c[NBLK] is the carry out of the adder
  logic [NBLK:0] c;
  assign c[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int unsigned LO = k * BLOCK;
    localparam int unsigned HI = ((k + 1) * BLOCK < WIDTH) ? (k + 1) * BLOCK : WIDTH;
    localparam int unsigned BW = HI - LO;

    // ripple-carry block with a fixed carry in (bit-level full adders)
    function automatic logic [BW:0] ripple(input logic [BW-1:0] x, input logic [BW-1:0] y,
                                           input logic ci);
      logic [BW:0] r;
      logic        cc;
      cc = ci;
      for (int i = 0; i < BW; i++) begin
        r[i] = x[i] ^ y[i] ^ cc;
        cc   = (x[i] & y[i]) | (x[i] & cc) | (y[i] & cc);
      end
      r[BW] = cc;
      return r;
    endfunction

    if (k == 0) begin : g_first
      logic [BW:0] r;
      assign r            = ripple(a[HI-1:LO], b[HI-1:LO], c[0]);
      assign sum[HI-1:LO] = r[BW-1:0];
      assign c[1]         = r[BW];
    end else begin : g_sel
      logic [BW:0] r0, r1;
      assign r0           = ripple(a[HI-1:LO], b[HI-1:LO], 1'b0);
      assign r1           = ripple(a[HI-1:LO], b[HI-1:LO], 1'b1);
      assign sum[HI-1:LO] = c[k] ? r1[BW-1:0] : r0[BW-1:0];
      assign c[k+1]       = c[k] ? r1[BW]     : r0[BW];
    end
  end

  assign cout = c[NBLK];

endmodule
