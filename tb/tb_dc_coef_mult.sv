// tb_dc_coef_mult: exhaustive test of the dc-coefficient multiplier over all
// 8-bit signed inputs. The accurate instance must give exactly 45 * x; the
// instance with approximation 4 in its 8 low bits must match the
// truth-table reference model, and must differ from 45 * x for some inputs.
`timescale 1ns/1ps
module tb_dc_coef_mult;
  import approx_pkg::*;
  import tb_ref_pkg::*;

  localparam int DW = 8, OW = 18;
  logic signed [DW-1:0] x;
  logic signed [OW-1:0] p_acc, p_apx;
  int checks = 0, failures = 0, differ = 0;

  dc_coef_mult #(.DW(DW), .OW(OW), .APPROX_LSB(0), .KIND(FA_ACCURATE)) u_acc (.x, .p(p_acc));
  dc_coef_mult #(.DW(DW), .OW(OW), .APPROX_LSB(8), .KIND(FA_APPROX4))  u_apx (.x, .p(p_apx));

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
      checks++;
      if (longint'(p_acc) != 45 * n) begin
        failures++;
        $display("FAIL accurate: 45 * %0d = %0d", n, p_acc);
      end
      ev = dc_mult(longint'(n), OW, 8, 4);
      checks++;
      if (64'(unsigned'(p_apx)) != ev) begin
        failures++;
        if (failures < 10) $display("FAIL approx: x=%0d got %h want %h", n, p_apx, ev);
      end
      if (longint'(p_apx) != 45 * n) differ++;
    end
    checks++;
    if (differ == 0) begin
      failures++;
      $display("FAIL approximate multiplier never differed from 45 * x");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
