// shift_add_mult: constant multiplier for a coefficient of the form
// +/-(2^SHIFT_HI + 2^SHIFT_LO). The signed input is sign-extended to OW bits
// and negated when NEGATE is set (exactly, as the two's complement -x); the
// two left-shifted copies are then added by one approx_rca whose APPROX_LSB
// low cells are of kind KIND. SHIFT_HI = SHIFT_LO gives 2^(SHIFT_HI+1).
// Two shifts and one ripple-carry addition per product is the published
// scheme; handling the sign by exact negation of the input is this design's
// choice, so that the approximate adder always adds.
//
// Interface: x (DW bits, signed) in; p (OW bits, signed) out, the product
// modulo 2^OW. Combinational.
module shift_add_mult
  import approx_pkg::*;
#(
  parameter int       DW         = 8,
  parameter int       OW         = 18,
  parameter int       SHIFT_HI   = 5,
  parameter int       SHIFT_LO   = 4,
  parameter bit       NEGATE     = 1'b0,
  parameter int       APPROX_LSB = 8,
  parameter fa_kind_e KIND       = FA_APPROX4
) (
  input  logic signed [DW-1:0] x,
  output logic signed [OW-1:0] p
);

  logic signed [OW-1:0] x_ext;
  logic signed [OW-1:0] v;
  logic                 unused_cout;

  assign x_ext = OW'(x);
  assign v     = NEGATE ? -x_ext : x_ext;

  approx_rca #(.WIDTH(OW), .APPROX_LSB(APPROX_LSB), .KIND(KIND)) u_rca (
    .a   (v <<< SHIFT_HI),
    .b   (v <<< SHIFT_LO),
    .cin (1'b0),
    .sum (p),
    .cout(unused_cout)
  );

endmodule
