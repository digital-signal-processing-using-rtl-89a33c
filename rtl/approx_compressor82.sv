// approx_compressor82: 8:2 carry-save compressor. Three approx_compressor42
// blocks form a two-level tree: the first two compress words 0-3 and 4-7,
// the third compresses their four outputs to one sum and one carry word, so
// that s + c = sum of w[0..7] (mod 2^WIDTH) when the cells are accurate.
// An 8:2 carry-save tree of approximate cells is the published scheme; the
// tree of three 4:2 blocks is this design's choice.
//
// Interface: w (8 x WIDTH bits) in; s, c (WIDTH bits) out. Combinational,
// four full-adder delays deep.
module approx_compressor82
  import approx_pkg::*;
#(
  parameter int       WIDTH      = 16,
  parameter int       APPROX_LSB = 8,
  parameter fa_kind_e KIND       = FA_APPROX4
) (
  input  logic [7:0][WIDTH-1:0] w,
  output logic [WIDTH-1:0]      s,
  output logic [WIDTH-1:0]      c
);

  logic [3:0][WIDTH-1:0] mid;

  approx_compressor42 #(.WIDTH(WIDTH), .APPROX_LSB(APPROX_LSB), .KIND(KIND)) u_lo (
    .w(w[3:0]), .s(mid[0]), .c(mid[1])
  );

  approx_compressor42 #(.WIDTH(WIDTH), .APPROX_LSB(APPROX_LSB), .KIND(KIND)) u_hi (
    .w(w[7:4]), .s(mid[2]), .c(mid[3])
  );

  approx_compressor42 #(.WIDTH(WIDTH), .APPROX_LSB(APPROX_LSB), .KIND(KIND)) u_top (
    .w(mid), .s(s), .c(c)
  );

endmodule
