// idct8_1d: eight-point 1-D integer IDCT, x(i) = (sum_k a(k,i) y(k)) >>> 7, i = 0..7,
// with the coefficients a(k,i) of dct_pkg.
//
// Each of the eight outputs is built the same way: eight constant
// multipliers form the products, an approx_compressor82 carry-save tree
// reduces them to two words, an approx_rca adds those, and the ACC_W-bit
// result is shifted right arithmetically by OUT_SHIFT = 7 to undo the
// coefficient scaling of 128.
// It uses the transpose of the DCT matrix: the term of y(0) is the dc
// coefficient 45 (dc_coef_mult), the terms of y(1..7) are shift-and-add
// coefficients (shift_add_mult).
// Every adder cell below bit APPROX_LSB is of kind KIND; all other cells are
// accurate. With KIND = FA_ACCURATE the block computes the exact integer
// transform of the altered coefficients.
// The published scheme gives the IDCT the same structure as the DCT; using
// the transpose of the same altered matrix is this design's choice.
//
// Interface: y_in (8 signed DW-bit words, element k = coefficient y(k)) in;
// x_out (8 signed OW-bit words, element i = sample x(i)) out. Purely combinational.
// ACC_W = DW + 10 holds the largest sum of eight products (|a| <= 64) with
// one bit to spare.
module idct8_1d
  import approx_pkg::*;
  import dct_pkg::*;
#(
  parameter int       DW         = 11,
  parameter int       ACC_W      = DW + 10,
  parameter int       OW         = ACC_W - OUT_SHIFT,
  parameter int       APPROX_LSB = 8,
  parameter fa_kind_e KIND       = FA_APPROX4
) (
  input  logic [N-1:0][DW-1:0] y_in,
  output logic [N-1:0][OW-1:0] x_out
);

  for (genvar o = 0; o < N; o++) begin : g_out
    logic [N-1:0][ACC_W-1:0] prod;
    logic [ACC_W-1:0]        cs_s, cs_c;
    logic signed [ACC_W-1:0] acc;
    logic                    unused_cout;

    for (genvar j = 0; j < N; j++) begin : g_term
      if (j == 0) begin : g_dc
        dc_coef_mult #(
          .DW(DW), .OW(ACC_W), .APPROX_LSB(APPROX_LSB), .KIND(KIND)
        ) u_mult (
          .x(y_in[j]), .p(prod[j])
        );
      end else begin : g_ac
        shift_add_mult #(
          .DW        (DW),
          .OW        (ACC_W),
          .SHIFT_HI  (coef_shift_hi(j, o)),
          .SHIFT_LO  (coef_shift_lo(j, o)),
          .NEGATE    (coef_negative(j, o)),
          .APPROX_LSB(APPROX_LSB),
          .KIND      (KIND)
        ) u_mult (
          .x(y_in[j]), .p(prod[j])
        );
      end
    end

    approx_compressor82 #(.WIDTH(ACC_W), .APPROX_LSB(APPROX_LSB), .KIND(KIND)) u_tree (
      .w(prod), .s(cs_s), .c(cs_c)
    );

    approx_rca #(.WIDTH(ACC_W), .APPROX_LSB(APPROX_LSB), .KIND(KIND)) u_rca (
      .a(cs_s), .b(cs_c), .cin(1'b0), .sum(acc), .cout(unused_cout)
    );

    assign x_out[o] = OW'(acc >>> OUT_SHIFT);
  end

endmodule
