// dct_idct_system: the DCT-IDCT datapath of a transform image coder, built
// entirely from ripple-carry adders and carry-save compressors whose low
// APPROX_LSB bit positions use approximate mirror-adder cells of kind KIND.
// A block of eight signed samples goes through the integer DCT (dct8_1d);
// its eight coefficients are brought out and fed to the integer IDCT
// (idct8_1d), which reconstructs the samples. Comparing x_rec with x_in
// shows the quality lost to the altered coefficients and the approximate
// adders together.
//
// Timing (this design's own choice): the DCT output is registered, then the
// IDCT output, so y_out is valid one cycle and x_rec two cycles after the
// block is presented with in_valid high; a new block may be presented every
// cycle. y_valid and x_valid mark valid outputs. rst_n is synchronous and
// active low and clears only the valid flags.
//
// Interface: clk, rst_n, in_valid, x_in (8 x DW signed) in;
// y_valid, y_out (8 x YW signed), x_valid, x_rec (8 x XW signed) out.
module dct_idct_system
  import approx_pkg::*;
  import dct_pkg::*;
#(
  parameter int       DW         = 8,
  parameter int       APPROX_LSB = 8,
  parameter fa_kind_e KIND       = FA_APPROX4,
  // widths of the DCT and IDCT outputs, as dct8_1d and idct8_1d derive them
  parameter int       YW         = DW + 10 - OUT_SHIFT,
  parameter int       XW         = YW + 10 - OUT_SHIFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [N-1:0][DW-1:0] x_in,
  output logic                 y_valid,
  output logic [N-1:0][YW-1:0] y_out,
  output logic                 x_valid,
  output logic [N-1:0][XW-1:0] x_rec
);

  logic [N-1:0][YW-1:0] y_comb;
  logic [N-1:0][XW-1:0] x_comb;

  dct8_1d #(.DW(DW), .APPROX_LSB(APPROX_LSB), .KIND(KIND)) u_dct (
    .x_in (x_in),
    .y_out(y_comb)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      x_valid <= 1'b0;
    end else begin
      y_valid <= in_valid;
      x_valid <= y_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) y_out <= y_comb;
    if (y_valid)  x_rec <= x_comb;
  end

  idct8_1d #(.DW(YW), .APPROX_LSB(APPROX_LSB), .KIND(KIND)) u_idct (
    .y_in (y_out),
    .x_out(x_comb)
  );

endmodule
