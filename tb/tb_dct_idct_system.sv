// tb_dct_idct_system: end-to-end test of the DCT-IDCT datapath at its default
// parameters (8-bit samples, approximation 4 in the 8 low bits of every
// adder). Blocks of eight random samples are streamed through: mostly back
// to back, sometimes with idle cycles, and once across a reset. For every
// block the test checks that y_out appears exactly one cycle and x_rec
// exactly two cycles after the block was presented, and that both match the
// truth-table reference model of the whole datapath. It counts how often
// each mechanism occurred (back-to-back blocks, idle cycles, reset with data
// in flight, coefficients changed by the approximate adders, reconstructed
// samples changed by them) and fails if one never did.
`timescale 1ns/1ps
module tb_dct_idct_system;
  import approx_pkg::*;
  import tb_ref_pkg::*;

  localparam int DW = 8, YW = DW + 3, XW = YW + 3;
  localparam int K = 8, KIND = 4;   // the design's defaults
  localparam int NBLK = 400;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [7:0][DW-1:0] x_in;
  logic y_valid, x_valid;
  logic [7:0][YW-1:0] y_out;
  logic [7:0][XW-1:0] x_rec;

  dct_idct_system u_dut (
    .clk, .rst_n, .in_valid, .x_in, .y_valid, .y_out, .x_valid, .x_rec
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_back_to_back = 0, n_idle = 0, n_reset_flush = 0, n_y_changed = 0, n_x_changed = 0;

  // expected results, queued in presentation order
  typedef struct {
    longint y_apx [8];
    longint x_apx [8];
    int     t_in;
  } blk_t;
  blk_t q_y [$];
  blk_t q_x [$];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    blk_t e;
    if (rst_n && y_valid) begin
      checks++;
      if (q_y.size() == 0) begin
        failures++;
        $display("FAIL unexpected y_valid at cycle %0d", cycle);
      end else begin
        e = q_y.pop_front();
        if (cycle - e.t_in != 1) begin
          failures++;
          $display("FAIL y latency %0d", cycle - e.t_in);
        end
        for (int k = 0; k < 8; k++)
          if (sext(64'(y_out[k]), YW) != e.y_apx[k]) begin
            failures++;
            $display("FAIL y(%0d) = %0d, want %0d", k, sext(64'(y_out[k]), YW), e.y_apx[k]);
          end
        q_x.push_back(e);
      end
    end
    if (rst_n && x_valid) begin
      checks++;
      if (q_x.size() == 0) begin
        failures++;
        $display("FAIL unexpected x_valid at cycle %0d", cycle);
      end else begin
        e = q_x.pop_front();
        if (cycle - e.t_in != 2) begin
          failures++;
          $display("FAIL x latency %0d", cycle - e.t_in);
        end
        for (int i = 0; i < 8; i++)
          if (sext(64'(x_rec[i]), XW) != e.x_apx[i]) begin
            failures++;
            $display("FAIL x(%0d) = %0d, want %0d", i, sext(64'(x_rec[i]), XW), e.x_apx[i]);
          end
      end
    end
  end

  initial begin
    longint v [8];
    longint y_apx [8], y_acc [8], x_acc [8];
    blk_t e;
    bit prev_valid;
    x_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    prev_valid = 1'b0;
    for (int b = 0; b < NBLK; b++) begin
      // a reset with two blocks in flight, half way through
      if (b == NBLK / 2) begin
        @(posedge clk);
        #1 in_valid = 1'b0;
        @(posedge clk);                    // block b-1 now in the y register
        #1 rst_n = 1'b0;
        @(posedge clk);
        #1 rst_n = 1'b1;
        checks++;
        if (y_valid || x_valid) begin
          failures++;
          $display("FAIL valid flags not cleared by reset");
        end else n_reset_flush++;
        q_y.delete();
        q_x.delete();
        prev_valid = 1'b0;
      end
      if ($urandom_range(0, 9) == 0) begin // an idle cycle
        @(posedge clk);
        #1 in_valid = 1'b0;
        n_idle++;
        prev_valid = 1'b0;
      end
      for (int j = 0; j < 8; j++) begin
        v[j] = (b < 2) ? ((b == 0) ? -128 : 127) : sext(64'($urandom), DW);
      end
      for (int k = 0; k < 8; k++) begin
        y_apx[k] = transform_out(v, k, 1'b0, DW + 10, K, KIND);
        y_acc[k] = transform_exact(v, k, 1'b0);
        if (y_apx[k] != y_acc[k]) n_y_changed++;
      end
      for (int i = 0; i < 8; i++) begin
        e.y_apx[i] = y_apx[i];
        e.x_apx[i] = transform_out(y_apx, i, 1'b1, YW + 10, K, KIND);
      end
      for (int i = 0; i < 8; i++) begin
        x_acc[i] = transform_exact(y_acc, i, 1'b1);
        if (e.x_apx[i] != x_acc[i]) n_x_changed++;
      end
      if (prev_valid) n_back_to_back++;
      @(posedge clk);
      #1;
      for (int j = 0; j < 8; j++) x_in[j] = DW'(v[j]);
      in_valid = 1'b1;
      e.t_in = cycle;
      q_y.push_back(e);
      prev_valid = 1'b1;
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (q_y.size() != 0 || q_x.size() != 0) begin
      failures++;
      $display("FAIL %0d / %0d blocks never came out", q_y.size(), q_x.size());
    end
    $display("back-to-back blocks %0d, idle cycles %0d, resets with data in flight %0d",
             n_back_to_back, n_idle, n_reset_flush);
    $display("coefficients changed by approximate adders %0d, reconstructed samples changed %0d",
             n_y_changed, n_x_changed);
    checks++;
    if (n_back_to_back == 0 || n_idle == 0 || n_reset_flush == 0 ||
        n_y_changed == 0 || n_x_changed == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
