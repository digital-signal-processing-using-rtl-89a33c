// approx_compressor42: 4:2 carry-save compressor. Two approx_csa32 rows
// reduce four WIDTH-bit words to a sum word and a carry word:
//   row 1: w[0] + w[1] + w[2]  -> s1, c1
//   row 2: s1   + c1   + w[3]  -> s,  c
// so that s + c = w[0] + w[1] + w[2] + w[3] (mod 2^WIDTH) when the cells are
// accurate. The two outputs are meant for a final ripple-carry adder.
// A 4:2 carry-save stage of approximate cells is the published scheme; its
// arrangement as two 3:2 rows is this design's choice.
//
// Interface: w (4 x WIDTH bits) in; s, c (WIDTH bits) out. Combinational,
// two full-adder delays deep.
module approx_compressor42
  import approx_pkg::*;
#(
  parameter int       WIDTH      = 16,
  parameter int       APPROX_LSB = 8,
  parameter fa_kind_e KIND       = FA_APPROX4
) (
  input  logic [3:0][WIDTH-1:0] w,
  output logic [WIDTH-1:0]      s,
  output logic [WIDTH-1:0]      c
);

  logic [WIDTH-1:0] s1, c1;

  approx_csa32 #(.WIDTH(WIDTH), .APPROX_LSB(APPROX_LSB), .KIND(KIND)) u_row1 (
    .x(w[0]), .y(w[1]), .z(w[2]), .s(s1), .c(c1)
  );

  approx_csa32 #(.WIDTH(WIDTH), .APPROX_LSB(APPROX_LSB), .KIND(KIND)) u_row2 (
    .x(s1), .y(c1), .z(w[3]), .s(s), .c(c)
  );

endmodule
