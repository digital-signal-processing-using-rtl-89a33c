// approx_fa: one-bit full adder, either the conventional mirror adder or one
// of its four transistor-reduced approximations. The cell is chosen by the
// KIND parameter (see approx_pkg).
//
// Like the transistor circuit it models, the cell first forms the inverted
// carry cout_n, then the inverted sum sum_n from cout_n and the inputs, and
// drives both outputs through inverters. Each equation below is read off the
// pull-down network of the corresponding mirror-adder schematic (the pull-up
// network is its dual):
//   accurate : cout_n = ~(a&b | cin&(a|b))    sum_n = ~(cout_n&(a|b|cin) | a&b&cin)
//   approx 1 : cout_n = ~(b | a&cin)          sum_n = ~(cout_n&cin | a&b&cin)
//   approx 2 : cout_n as accurate             sum   = cout_n (buffered)
//   approx 3 : cout_n as approx 1             sum   = cout_n (buffered)
//   approx 4 : cout_n = ~a                    sum_n as approx 1
// The resulting truth tables are the published ones: approx 1 errs in rows
// 010 (sum, cout) and 100 (sum); approx 2 in rows 000 and 111 (sum only);
// approx 3 in rows 000, 010, 111 (sum) and 010 (cout); approx 4 in rows 010,
// 011, 100 (sum) and 011, 100 (cout).
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module approx_fa
  import approx_pkg::*;
#(
  parameter fa_kind_e KIND = FA_APPROX4
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic cout_n;  // inverted carry, the mirror adder's first-stage node
  logic sum_n;   // inverted sum, second-stage node

  always_comb begin
    unique case (KIND)
      FA_ACCURATE: begin
        cout_n = ~((a & b) | (cin & (a | b)));
        sum_n  = ~((cout_n & (a | b | cin)) | (a & b & cin));
      end
      FA_APPROX1: begin
        cout_n = ~(b | (a & cin));
        sum_n  = ~((cout_n & cin) | (a & b & cin));
      end
      FA_APPROX2: begin
        cout_n = ~((a & b) | (cin & (a | b)));
        sum_n  = ~cout_n;                 // two inverters: sum = cout_n
      end
      FA_APPROX3: begin
        cout_n = ~(b | (a & cin));
        sum_n  = ~cout_n;
      end
      default: begin                      // FA_APPROX4
        cout_n = ~a;
        sum_n  = ~((cout_n & cin) | (a & b & cin));
      end
    endcase
  end

  assign sum  = ~sum_n;
  assign cout = ~cout_n;

endmodule
