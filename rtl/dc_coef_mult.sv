// dc_coef_mult: multiplier for the dc coefficient a(0,i) = 45, which is kept
// at full precision. 45 = 2^5 + 2^3 + 2^2 + 2^0, so the product is the sum of
// four shifted copies of the sign-extended input. An approx_compressor42
// reduces the four terms to two, and an approx_rca adds those. Both use
// cells of kind KIND in their APPROX_LSB low positions. The 4:2 compressor
// plus RCA structure is the published one; the value 45 is this design's
// choice of integer for the scaled dc cosine.
//
// Interface: x (DW bits, signed) in; p (OW bits, signed) out, 45*x modulo
// 2^OW when the cells are accurate. Combinational.
module dc_coef_mult
  import approx_pkg::*;
  import dct_pkg::*;
#(
  parameter int       DW         = 8,
  parameter int       OW         = 18,
  parameter int       APPROX_LSB = 8,
  parameter fa_kind_e KIND       = FA_APPROX4
) (
  input  logic signed [DW-1:0] x,
  output logic signed [OW-1:0] p
);

  logic signed [OW-1:0]  x_ext;
  logic [3:0][OW-1:0]    terms;
  logic [OW-1:0]         cs_s, cs_c;
  logic                  unused_cout;

  assign x_ext    = OW'(x);
  assign terms[0] = x_ext <<< DC_SHIFT0;
  assign terms[1] = x_ext <<< DC_SHIFT1;
  assign terms[2] = x_ext <<< DC_SHIFT2;
  assign terms[3] = x_ext <<< DC_SHIFT3;

  approx_compressor42 #(.WIDTH(OW), .APPROX_LSB(APPROX_LSB), .KIND(KIND)) u_cmp (
    .w(terms), .s(cs_s), .c(cs_c)
  );

  approx_rca #(.WIDTH(OW), .APPROX_LSB(APPROX_LSB), .KIND(KIND)) u_rca (
    .a(cs_s), .b(cs_c), .cin(1'b0), .sum(p), .cout(unused_cout)
  );

endmodule
