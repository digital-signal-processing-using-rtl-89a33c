// tb_approx_rca: random test of the approximate ripple-carry adder in five
// configurations (accurate, and approximations 1-4 in the low 8, 5, 9 and 8
// bits of a 16-bit adder). Each result is compared with the truth-table
// reference model; the accurate one also with a + b + cin. The approximate
// ones must differ from a + b + cin for some inputs.
`timescale 1ns/1ps
module tb_approx_rca;
  import approx_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 16;
  localparam int NCFG = 5;
  localparam int        K    [NCFG] = '{8, 8, 5, 9, 8};
  localparam fa_kind_e  KD   [NCFG] = '{FA_ACCURATE, FA_APPROX1, FA_APPROX2, FA_APPROX3, FA_APPROX4};

  logic [W-1:0] a, b;
  logic         cin;
  logic [W-1:0] sum  [NCFG];
  logic         cout [NCFG];
  int checks = 0, failures = 0;
  int differ = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    approx_rca #(.WIDTH(W), .APPROX_LSB(K[g]), .KIND(KD[g])) u_dut (
      .a, .b, .cin, .sum(sum[g]), .cout(cout[g])
    );
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned exp_v;
    logic [W:0] exact;
    for (int n = 0; n < 2000; n++) begin
      a   = W'($urandom);
      b   = W'($urandom);
      cin = 1'($urandom);
      if (n == 0) begin a = '1; b = '1; cin = 1'b1; end
      #1;
      exact = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      for (int g = 0; g < NCFG; g++) begin
        exp_v = rca(64'(a), 64'(b), cin, W, K[g], int'(KD[g]));
        checks++;
        if (64'(sum[g]) != exp_v) begin
          failures++;
          if (failures < 10)
            $display("FAIL cfg %0d: %h + %h + %b = %h, want %h", g, a, b, cin, sum[g], exp_v);
        end
        if (g == 0) begin
          checks++;
          if ({cout[0], sum[0]} != exact) begin
            failures++;
            $display("FAIL accurate: %h + %h + %b = %h, want %h", a, b, cin, {cout[0], sum[0]}, exact);
          end
        end else if (sum[g] != exact[W-1:0]) differ++;
      end
    end
    // the approximate adders must actually differ from the exact sum sometimes
    checks++;
    if (differ == 0) begin
      failures++;
      $display("FAIL approximate adders never differed from the exact sum");
    end
    $display("approximate results that differ from the exact sum: %0d", differ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
