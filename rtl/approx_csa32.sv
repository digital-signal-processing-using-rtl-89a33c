// approx_csa32: one carry-save (3:2) row. Each bit position holds an approx_fa
// that adds the three input bits of that position; its sum bit stays in place
// and its carry moves one position up. Cells below APPROX_LSB are of kind
// KIND, the rest accurate.
//
// Interface: x, y, z (WIDTH bits) in; s, c (WIDTH bits) out with
// s + c = x + y + z modulo 2^WIDTH when the cells are accurate (c[0] = 0,
// the carry out of the top bit is dropped). Purely combinational.
module approx_csa32
  import approx_pkg::*;
#(
  parameter int       WIDTH      = 16,
  parameter int       APPROX_LSB = 8,
  parameter fa_kind_e KIND       = FA_APPROX4
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c
);

  logic [WIDTH-1:0] carry_out;
  logic             unused_top_carry;  // carry out of the top bit, dropped

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    approx_fa #(.KIND(cell_kind(i, APPROX_LSB, KIND))) u_fa (
      .a   (x[i]),
      .b   (y[i]),
      .cin (z[i]),
      .sum (s[i]),
      .cout(carry_out[i])
    );
  end

  assign c                = {carry_out[WIDTH-2:0], 1'b0};
  assign unused_top_carry = carry_out[WIDTH-1];

endmodule
