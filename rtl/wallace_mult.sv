// wallace_mult: signed Wallace tree multiplier.
//
// The product of a (WA bits, two's complement) and b (WB bits, two's
// complement) is formed from WB+1 partial-product rows, each PW = WA+WB bits
// wide with a sign-extended:
//   row j (j < WB-1):  b[j] ? a << j : 0
//   row WB-1:          b[WB-1] ? ~(a << (WB-1)) : 0    (the sign bit of b weighs -2^(WB-1))
//   row WB:            b[WB-1]                          (the +1 that completes the negation)
// The rows are then reduced Wallace style: at every level the rows are taken
// in groups of three and each group is replaced by a sum row and a carry row
// (a layer of full adders with no carry propagation), rows left over pass to
// the next level untouched. When two rows remain, a carry select adder
// (csel_adder) adds them. All arithmetic is modulo 2^PW, which gives the exact
// two's complement product.
//
// Interface: a, b -> p. Purely combinational. Widths are this design's choice;
// the multiplier is used with one operand from the coefficient registers.
module wallace_mult #(
  parameter int unsigned WA = 16,
  parameter int unsigned WB = 16
) (
  input  logic signed [WA-1:0]    a,
  input  logic signed [WB-1:0]    b,
  output logic signed [WA+WB-1:0] p
);

  localparam int unsigned PW  = WA + WB;
  localparam int unsigned NPP = WB + 1;

  logic [PW-1:0] row0, row1;   // the two rows left after reduction

  always_comb begin
    logic [PW-1:0] rows [NPP];
    logic [PW-1:0] next [NPP];
    logic [PW-1:0] aext;
    int unsigned   n, m;

    aext = PW'(a);              // sign extension to the product width
    for (int j = 0; j < NPP; j++) rows[j] = '0;
    for (int j = 0; j < int'(WB) - 1; j++)
      rows[j] = b[j] ? (aext << j) : '0;
    rows[WB-1] = b[WB-1] ? ~(aext << (WB - 1)) : '0;
    rows[WB]   = PW'(b[WB-1]);
    n = NPP;

    // Wallace reduction: 3 rows -> 2 rows per group, until two rows are left
    for (int lvl = 0; lvl < int'(NPP); lvl++) begin
      if (n > 2) begin
        for (int j = 0; j < NPP; j++) next[j] = '0;
        m = 0;
        for (int g = 0; g < int'(NPP); g += 3) begin
          if (g + 2 < n) begin
            next[m]   = rows[g] ^ rows[g+1] ^ rows[g+2];
            next[m+1] = ((rows[g] & rows[g+1]) | (rows[g] & rows[g+2]) |
                         (rows[g+1] & rows[g+2])) << 1;
            m += 2;
          end else begin
            if (g < n)     begin next[m] = rows[g];   m += 1; end
            if (g + 1 < n) begin next[m] = rows[g+1]; m += 1; end
          end
        end
        rows = next;
        n    = m;
      end
    end

    row0 = rows[0];
    row1 = (n > 1) ? rows[1] : '0;
  end

  logic [PW-1:0] psum;
  logic          pcout;

  csel_adder #(.WIDTH(PW)) u_final (
    .a   (row0),
    .b   (row1),
    .cin (1'b0),
    .sum (psum),
    .cout(pcout)
  );

  assign p = signed'(psum);

endmodule
