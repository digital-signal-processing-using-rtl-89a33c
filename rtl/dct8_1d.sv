// dct8_1d: eight-point 1-D integer DCT, y(k) = (sum_i a(k,i) x(i)) >>> 7, k = 0..7,
// with the coefficients a(k,i) of dct_pkg.
//
// Each of the eight outputs is built the same way: eight constant
// multipliers form the products, an approx_compressor82 carry-save tree
// reduces them to two words, an approx_rca adds those, and the ACC_W-bit
// result is shifted right arithmetically by OUT_SHIFT = 7 to undo the
// coefficient scaling of 128.
// Row k = 0 multiplies every sample by the unaltered dc coefficient 45
// (dc_coef_mult); rows k = 1..7 use the shift-and-add coefficients
// (shift_add_mult).
// Every adder cell below bit APPROX_LSB is of kind KIND; all other cells are
// accurate. With KIND = FA_ACCURATE the block computes the exact integer
// transform of the altered coefficients.
// The per-output structure (constant multipliers, 8:2 compressor, RCA) is
// the published one; coefficient values, widths and the shift are this
// design's choices (see dct_pkg).
//
// Interface: x_in (8 signed DW-bit words, element i = sample x(i)) in;
// y_out (8 signed OW-bit words, element k = coefficient y(k)) out. Purely combinational.
// ACC_W = DW + 10 holds the largest sum of eight products (|a| <= 64) with
// one bit to spare.
module dct8_1d
  import approx_pkg::*;
  import dct_pkg::*;
#(
  parameter int       DW         = 8,
  parameter int       ACC_W      = DW + 10,
  parameter int       OW         = ACC_W - OUT_SHIFT,
  parameter int       APPROX_LSB = 8,
  parameter fa_kind_e KIND       = FA_APPROX4
) (
  input  logic [N-1:0][DW-1:0] x_in,
  output logic [N-1:0][OW-1:0] y_out
);

  for (genvar o = 0; o < N; o++) begin : g_out
    logic [N-1:0][ACC_W-1:0] prod;
    logic [ACC_W-1:0]        cs_s, cs_c;
    logic signed [ACC_W-1:0] acc;
    logic                    unused_cout;

    for (genvar j = 0; j < N; j++) begin : g_term
      if (o == 0) begin : g_dc
        dc_coef_mult #(
          .DW(DW), .OW(ACC_W), .APPROX_LSB(APPROX_LSB), .KIND(KIND)
        ) u_mult (
          .x(x_in[j]), .p(prod[j])
        );
      end else begin : g_ac
        shift_add_mult #(
          .DW        (DW),
          .OW        (ACC_W),
          .SHIFT_HI  (coef_shift_hi(o, j)),
          .SHIFT_LO  (coef_shift_lo(o, j)),
          .NEGATE    (coef_negative(o, j)),
          .APPROX_LSB(APPROX_LSB),
          .KIND      (KIND)
        ) u_mult (
          .x(x_in[j]), .p(prod[j])
        );
      end
    end

    approx_compressor82 #(.WIDTH(ACC_W), .APPROX_LSB(APPROX_LSB), .KIND(KIND)) u_tree (
      .w(prod), .s(cs_s), .c(cs_c)
    );

    approx_rca #(.WIDTH(ACC_W), .APPROX_LSB(APPROX_LSB), .KIND(KIND)) u_rca (
      .a(cs_s), .b(cs_c), .cin(1'b0), .sum(acc), .cout(unused_cout)
    );

    assign y_out[o] = OW'(acc >>> OUT_SHIFT);
  end

endmodule
