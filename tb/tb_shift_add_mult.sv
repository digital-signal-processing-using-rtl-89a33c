// tb_shift_add_mult: exhaustive test of the shift-and-add multiplier over all
// 8-bit signed inputs, for the coefficients +48 (2^5+2^4), -36 (2^5+2^2),
// +64 (2^5+2^5) and -12 (2^3+2^2). Accurate instances must give exactly
// coefficient * x; instances with approximation 2 in their low 8 bits must
// match the truth-table reference model.
`timescale 1ns/1ps
module tb_shift_add_mult;
  import approx_pkg::*;
  import tb_ref_pkg::*;

  localparam int DW = 8, OW = 18, NC = 4;
  localparam int HI  [NC] = '{5, 5, 5, 3};
  localparam int LO  [NC] = '{4, 2, 5, 2};
  localparam bit NEG [NC] = '{1'b0, 1'b1, 1'b0, 1'b1};
  localparam int CF  [NC] = '{48, -36, 64, -12};

  logic signed [DW-1:0] x;
  logic signed [OW-1:0] p_acc [NC];
  logic signed [OW-1:0] p_apx [NC];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NC; g++) begin : g_dut
    shift_add_mult #(.DW(DW), .OW(OW), .SHIFT_HI(HI[g]), .SHIFT_LO(LO[g]), .NEGATE(NEG[g]),
                     .APPROX_LSB(0), .KIND(FA_ACCURATE)) u_acc (.x, .p(p_acc[g]));
    shift_add_mult #(.DW(DW), .OW(OW), .SHIFT_HI(HI[g]), .SHIFT_LO(LO[g]), .NEGATE(NEG[g]),
                     .APPROX_LSB(8), .KIND(FA_APPROX2)) u_apx (.x, .p(p_apx[g]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ev;
    for (int n = -128; n < 128; n++) begin
      x = DW'(n);
      #1;
      for (int g = 0; g < NC; g++) begin
        checks++;
        if (longint'(p_acc[g]) != CF[g] * n) begin
          failures++;
          if (failures < 10) $display("FAIL accurate: %0d * %0d = %0d", CF[g], n, p_acc[g]);
        end
        ev = sa_mult(longint'(n), CF[g], OW, 8, 2);
        checks++;
        if (64'(unsigned'(p_apx[g])) != ev) begin
          failures++;
          if (failures < 10) $display("FAIL approx: %0d * %0d got %h want %h", CF[g], n, p_apx[g], ev);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
