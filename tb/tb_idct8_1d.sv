// tb_idct8_1d: random test of the eight-point integer IDCT. An accurate
// instance must equal the exact integer transform (coefficients derived
// here from cosines), shifted right by 7; an instance with approximation 4
// in its 8 low bits must match the truth-table reference model of every
// adder in the datapath. Inputs are random signed 11-bit words, with the
// extreme values applied first.
`timescale 1ns/1ps
module tb_idct8_1d;
  import approx_pkg::*;
  import tb_ref_pkg::*;

  localparam int DW = 11, ACC_W = DW + 10, OW = ACC_W - 7;
  logic [7:0][DW-1:0] din;
  logic [7:0][OW-1:0] out_acc, out_apx;
  int checks = 0, failures = 0, differ = 0;

  idct8_1d #(.DW(DW), .APPROX_LSB(0), .KIND(FA_ACCURATE)) u_acc (.y_in(din), .x_out(out_acc));
  idct8_1d #(.DW(DW), .APPROX_LSB(8), .KIND(FA_APPROX4))  u_apx (.y_in(din), .x_out(out_apx));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v [8];
    longint e_exact, e_apx;
    for (int n = 0; n < 300; n++) begin
      for (int j = 0; j < 8; j++) begin
        case (n)
          0: v[j] = -(longint'(1) << (DW - 1));                 // all most negative
          1: v[j] = (longint'(1) << (DW - 1)) - 1;              // all most positive
          2: v[j] = j[0] ? (longint'(1) << (DW - 1)) - 1 : -(longint'(1) << (DW - 1));
          default: v[j] = sext(64'($urandom), DW);
        endcase
        din[j] = DW'(v[j]);
      end
      #1;
      for (int o = 0; o < 8; o++) begin
        e_exact = transform_exact(v, o, 1'b1);
        e_apx   = transform_out(v, o, 1'b1, ACC_W, 8, 4);
        checks++;
        if (sext(64'(out_acc[o]), OW) != e_exact) begin
          failures++;
          if (failures < 10) $display("FAIL accurate out %0d: got %0d want %0d", o,
                                      sext(64'(out_acc[o]), OW), e_exact);
        end
        checks++;
        if (sext(64'(out_apx[o]), OW) != e_apx) begin
          failures++;
          if (failures < 10) $display("FAIL approx out %0d: got %0d want %0d", o,
                                      sext(64'(out_apx[o]), OW), e_apx);
        end
        if (e_apx != e_exact) differ++;
      end
    end
    $display("approximate outputs differing from the exact transform: %0d of %0d", differ, 300 * 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
