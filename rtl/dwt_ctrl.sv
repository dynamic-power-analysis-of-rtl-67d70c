// dwt_ctrl: control unit of the 1D DWT.
//
// After reset it runs through the coefficient memory once (LOAD state): one
// address per clock, and since the memory answers one clock later, a write
// strobe coef_we with the matching coef_waddr follows each address by one
// clock. On the edge that writes the last coefficient it enters RUN and
// raises in_ready; the coefficients are never read again.
//
// In RUN every accepted input pair (in_valid & in_ready) shifts the sample
// window. A fill counter counts the pairs of the current row (in_first
// restarts it at 1); only once five pairs are in is the 9-sample window full,
// and win_valid marks that the window register now holds a complete window.
// win_valid then travels down a PIPE-deep shift register alongside the
// datapath pipeline and comes out as out_valid.
//
// Timing: a pair accepted at clock edge t whose window is full gives an
// output with out_valid high after edge t+PIPE. Coefficient loading keeps
// in_ready low for NCOEF+2 clocks after reset. The state encoding, the row-start flag and the
// valid tracking are this design's choice.
module dwt_ctrl
  import dwt_pkg::*;
#(
  parameter int unsigned PIPE = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // input handshake
  input  logic      in_valid,
  input  logic      in_first,
  output logic      in_ready,
  output logic      shift,
  // coefficient memory and registers
  output coef_idx_e rom_addr,
  output logic      coef_we,
  output coef_idx_e coef_waddr,
  // output qualifier
  output logic      win_valid,
  output logic      out_valid
);

  typedef enum logic {S_LOAD, S_RUN} state_e;

  localparam int unsigned FILL_PAIRS = (TAPS + 1) / 2;   // 5 pairs fill 9 taps

  state_e          state;
  logic            rd_pending;
  logic [2:0]      fill;
  logic [PIPE-1:0] vld;

  assign in_ready = (state == S_RUN);
  assign shift    = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_LOAD;
      rom_addr   <= C_P;
      rd_pending <= 1'b0;
      coef_we    <= 1'b0;
      coef_waddr <= C_P;
    end else begin
      coef_we    <= rd_pending;
      coef_waddr <= rom_addr;
      if (state == S_LOAD) begin
        if (coef_we && coef_waddr == coef_idx_e'(NCOEF - 1)) begin
          state      <= S_RUN;             // last coefficient written on this edge
        end else if (!rd_pending && !coef_we) begin
          rd_pending <= 1'b1;              // address C_P presented this cycle
        end else if (rom_addr == coef_idx_e'(NCOEF - 1)) begin
          rd_pending <= 1'b0;              // last address presented
        end else begin
          rom_addr   <= coef_idx_e'(rom_addr + 3'd1);
        end
      end
    end
  end

  // window fill and valid pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill      <= '0;
      win_valid <= 1'b0;
      vld       <= '0;
    end else begin
      win_valid <= 1'b0;
      if (shift) begin
        if (in_first) begin
          fill      <= 3'd1;
          win_valid <= (FILL_PAIRS == 1);
        end else begin
          fill      <= (fill == 3'(FILL_PAIRS)) ? fill : fill + 3'd1;
          win_valid <= (fill + 3'd1 >= 3'(FILL_PAIRS));
        end
      end
      vld <= {vld[PIPE-2:0], win_valid};
    end
  end

  assign out_valid = vld[PIPE-1];

endmodule
