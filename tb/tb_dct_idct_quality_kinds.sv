// tb_dct_idct_quality_kinds: output-quality study of the DCT-IDCT datapath. A
// 32 x 32 8-bit test image is generated (smooth sinusoidal shading plus
// fine texture), level-shifted by -128 and sent row by row, eight pixels per
// block, through thirteen copies of the datapath: the accurate base case and
// approximations 1-4 in the 7, 8 and 9 low bits of every adder. Each
// reconstructed block is checked bit for bit against the truth-table
// reference model, then clamped back to 0..255, and the PSNR of every
// configuration against the original image is printed. The base case must
// reach at least 30 dB, and every approximate configuration must lose
// quality against it without collapsing below 10 dB.
`timescale 1ns/1ps
module tb_dct_idct_quality_kinds;
  import approx_pkg::*;
  import tb_ref_pkg::*;

  localparam int DW = 8, YW = DW + 3, XW = YW + 3;
  localparam int SIDE = 32;
  localparam int NCFG = 4;
  // configuration c: kind KD[c] in the low KL[c] bits
  localparam int KD [NCFG] = '{0, 1, 2, 3};
  localparam int KL [NCFG] = '{0, 8, 8, 8};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [7:0][DW-1:0] x_in;
  logic               y_valid [NCFG];
  logic               x_valid [NCFG];
  logic [7:0][YW-1:0] y_out   [NCFG];
  logic [7:0][XW-1:0] x_rec   [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    dct_idct_system #(.DW(DW), .APPROX_LSB(KL[g]), .KIND(fa_kind_e'(KD[g]))) u_dut (
      .clk, .rst_n, .in_valid, .x_in,
      .y_valid(y_valid[g]), .y_out(y_out[g]), .x_valid(x_valid[g]), .x_rec(x_rec[g])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pixel(int r, int c);
    real v;
    int  p;
    v = 128.0 + 80.0 * $sin(0.3 * c + 0.1 * r) * $cos(0.2 * r) + 20.0 * $sin(1.3 * c + 0.7 * r);
    p = int'(v);
    return (p < 0) ? 0 : (p > 255) ? 255 : p;
  endfunction

  initial begin
    real    sq_err [NCFG];
    real    psnr   [NCFG];
    longint v [8], y_ref [8];
    longint xr, e;
    int     rec;
    foreach (sq_err[c]) sq_err[c] = 0.0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < SIDE; r++) begin
      for (int b = 0; b < SIDE / 8; b++) begin
        for (int j = 0; j < 8; j++) begin
          v[j] = longint'(pixel(r, 8 * b + j)) - 128;
          x_in[j] = DW'(v[j]);
        end
        in_valid = 1'b1;
        @(posedge clk);
        #1 in_valid = 1'b0;
        @(posedge clk);                 // x_rec is valid after this edge
        #1;
        for (int c = 0; c < NCFG; c++) begin
          checks++;
          if (!x_valid[c]) begin
            failures++;
            $display("FAIL config %0d: x_valid low two cycles after the block", c);
          end
          for (int k = 0; k < 8; k++) y_ref[k] = transform_out(v, k, 1'b0, DW + 10, KL[c], KD[c]);
          for (int i = 0; i < 8; i++) begin
            e  = transform_out(y_ref, i, 1'b1, YW + 10, KL[c], KD[c]);
            xr = sext(64'(x_rec[c][i]), XW);
            checks++;
            if (xr != e) begin
              failures++;
              if (failures < 10) $display("FAIL config %0d x(%0d) = %0d, want %0d", c, i, xr, e);
            end
            rec = int'(xr) + 128;
            rec = (rec < 0) ? 0 : (rec > 255) ? 255 : rec;
            sq_err[c] += real'((rec - int'(v[i]) - 128) * (rec - int'(v[i]) - 128));
          end
        end
        @(posedge clk);                 // one idle cycle: x_valid must drop
        #1;
        for (int c = 0; c < NCFG; c++) begin
          checks++;
          if (x_valid[c]) begin
            failures++;
            $display("FAIL config %0d: x_valid still high after the block", c);
          end
        end
      end
    end
    for (int c = 0; c < NCFG; c++) begin
      real mse;
      mse = sq_err[c] / real'(SIDE * SIDE);
      psnr[c] = (mse == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / mse);
      if (c == 0) $display("base case (all cells accurate): PSNR %0.2f dB", psnr[c]);
      else        $display("approximation %0d in %0d LSBs: PSNR %0.2f dB", KD[c], KL[c], psnr[c]);
    end
    checks++;
    if (psnr[0] < 30.0) begin
      failures++;
      $display("FAIL base-case PSNR below 30 dB");
    end
    for (int c = 1; c < NCFG; c++) begin
      checks++;
      if (psnr[c] >= psnr[0] || psnr[c] < 10.0) begin
        failures++;
        $display("FAIL config %0d PSNR %0.2f dB outside (10 dB, base case)", c, psnr[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
