// tb_approx_compressor42: random test of the 4:2 compressor. An accurate
// instance must satisfy s + c = w0 + w1 + w2 + w3 (mod 2^16); an instance
// with approximation 3 in its low 8 bits must match the truth-table
// reference model bit for bit.
`timescale 1ns/1ps
module tb_approx_compressor42;
  import approx_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 16;
  logic [3:0][W-1:0] w;
  logic [W-1:0] s_acc, c_acc, s_apx, c_apx;
  int checks = 0, failures = 0;

  approx_compressor42 #(.WIDTH(W), .APPROX_LSB(0), .KIND(FA_ACCURATE)) u_acc (
    .w, .s(s_acc), .c(c_acc)
  );
  approx_compressor42 #(.WIDTH(W), .APPROX_LSB(8), .KIND(FA_APPROX3)) u_apx (
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
    logic [W-1:0] total;
    for (int n = 0; n < 2000; n++) begin
      for (int j = 0; j < 4; j++) w[j] = W'($urandom);
      #1;
      total = w[0] + w[1] + w[2] + w[3];
      checks++;
      if (W'(s_acc + c_acc) != total) begin
        failures++;
        $display("FAIL accurate: s+c = %h, want %h", W'(s_acc + c_acc), total);
      end
      comp42(64'(w[0]), 64'(w[1]), 64'(w[2]), 64'(w[3]), W, 8, 3, es, ec);
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
