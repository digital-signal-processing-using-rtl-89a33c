// tb_approx_compressor82: random test of the 8:2 compressor. An accurate
// instance must satisfy s + c = w0 + ... + w7 (mod 2^16); an instance
// with approximation 1 in its low 8 bits must match the truth-table
// reference model bit for bit.
`timescale 1ns/1ps
module tb_approx_compressor82;
  import approx_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 16;
  logic [7:0][W-1:0] w;
  logic [W-1:0] s_acc, c_acc, s_apx, c_apx;
  int checks = 0, failures = 0;

  approx_compressor82 #(.WIDTH(W), .APPROX_LSB(0), .KIND(FA_ACCURATE)) u_acc (
    .w, .s(s_acc), .c(c_acc)
  );
  approx_compressor82 #(.WIDTH(W), .APPROX_LSB(8), .KIND(FA_APPROX1)) u_apx (
    .w, .s(s_apx), .c(c_apx)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned es, ec;
    longint unsigned v[8];
    logic [W-1:0] total;
    for (int n = 0; n < 2000; n++) begin
      for (int j = 0; j < 8; j++) w[j] = W'($urandom);
      #1;
      total = w[0] + w[1] + w[2] + w[3] + w[4] + w[5] + w[6] + w[7];
      checks++;
      if (W'(s_acc + c_acc) != total) begin
        failures++;
        $display("FAIL accurate: s+c = %h, want %h", W'(s_acc + c_acc), total);
      end
      for (int j = 0; j < 8; j++) v[j] = 64'(w[j]);
      comp82(v, W, 8, 1, es, ec);
      checks++;
      if (64'(s_apx) != es || 64'(c_apx) != ec) begin
        failures++;
        if (failures < 10) $display("FAIL approx: s=%h c=%h, want %h %h", s_apx, c_apx, es, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
