// approx_rca: WIDTH-bit ripple-carry adder made of approx_fa cells. The
// APPROX_LSB least significant cells are of kind KIND; the others are the
// accurate mirror adder. With KIND = FA_ACCURATE or APPROX_LSB = 0 it is an
// exact adder. The adder type and the placement of approximate cells in the
// low bits follow the published technique; the default width is arbitrary
// (users instantiate it at the width they need).
//
// Interface: a, b (WIDTH bits), cin in; sum (WIDTH bits) and cout out.
// Two's-complement operands add modulo 2^WIDTH. Purely combinational; the
// carry ripples from bit 0 to bit WIDTH-1.
module approx_rca
  import approx_pkg::*;
#(
  parameter int       WIDTH      = 16,
  parameter int       APPROX_LSB = 8,
  parameter fa_kind_e KIND       = FA_APPROX4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    approx_fa #(.KIND(cell_kind(i, APPROX_LSB, KIND))) u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
