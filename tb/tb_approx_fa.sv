// tb_approx_fa: exhaustive test of all five full-adder cells. Every input row
// {a,b,cin} is applied to one instance of each kind; sum and carry are
// compared with the published truth table, written out literally below, and
// the number of rows in which each cell differs from the accurate adder is
// compared with the error counts quoted for it (approx 1: 2 sum / 1 carry,
// approx 2: 2 / 0, approx 3: 3 / 1, approx 4: 3 / 2).
`timescale 1ns/1ps
module tb_approx_fa;
  import approx_pkg::*;

  // Truth table columns as printed, rows {a,b,cin} = 000 .. 111 left to right;
  // entry 0 is the accurate adder, entries 1..4 approximations 1..4.
  localparam string SUM_COL  [5] = '{"01101001", "01000001", "11101000", "11001000", "01010001"};
  localparam string COUT_COL [5] = '{"00010111", "00110111", "00010111", "00110111", "00001111"};
  localparam int SUM_ERRS  [5] = '{0, 2, 2, 3, 3};
  localparam int COUT_ERRS [5] = '{0, 1, 0, 1, 2};

  logic a, b, cin;
  logic [4:0] sum, cout;
  int checks = 0, failures = 0;

  approx_fa #(.KIND(FA_ACCURATE)) u0 (.a, .b, .cin, .sum(sum[0]), .cout(cout[0]));
  approx_fa #(.KIND(FA_APPROX1))  u1 (.a, .b, .cin, .sum(sum[1]), .cout(cout[1]));
  approx_fa #(.KIND(FA_APPROX2))  u2 (.a, .b, .cin, .sum(sum[2]), .cout(cout[2]));
  approx_fa #(.KIND(FA_APPROX3))  u3 (.a, .b, .cin, .sum(sum[3]), .cout(cout[3]));
  approx_fa #(.KIND(FA_APPROX4))  u4 (.a, .b, .cin, .sum(sum[4]), .cout(cout[4]));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int serr [5];
    int cerr [5];
    logic [4:0] exp_s, exp_c;
    foreach (serr[j]) begin serr[j] = 0; cerr[j] = 0; end
    for (int r = 0; r < 8; r++) begin
      {a, b, cin} = 3'(r);
      #1;
      for (int j = 0; j < 5; j++) begin
        exp_s[j] = (SUM_COL[j][r] == "1");
        exp_c[j] = (COUT_COL[j][r] == "1");
      end
      for (int j = 0; j < 5; j++) begin
        checks++;
        if (sum[j] !== exp_s[j] || cout[j] !== exp_c[j]) begin
          failures++;
          $display("FAIL kind %0d row %03b: got sum=%b cout=%b, want %b %b",
                   j, r[2:0], sum[j], cout[j], exp_s[j], exp_c[j]);
        end
        if (sum[j]  !== (a ^ b ^ cin))                   serr[j]++;
        if (cout[j] !== ((a & b) | (cin & (a | b))))     cerr[j]++;
      end
    end
    for (int j = 0; j < 5; j++) begin
      checks++;
      if (serr[j] != SUM_ERRS[j] || cerr[j] != COUT_ERRS[j]) begin
        failures++;
        $display("FAIL kind %0d: %0d sum / %0d carry errors, want %0d / %0d",
                 j, serr[j], cerr[j], SUM_ERRS[j], COUT_ERRS[j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
