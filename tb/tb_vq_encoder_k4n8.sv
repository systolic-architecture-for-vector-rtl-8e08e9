// tb_vq_encoder_k4n8: end-to-end test of the systolic VQ encoder with an
// even vector length and a larger codebook (K = 4, N = 8, W = 10). An even
// K checks the offset counter's initial value N - floor(K/2) and the
// codeword order of the 100%-efficiency stream for even K.
module tb_vq_encoder_k4n8;
  localparam int unsigned K = 4;
  localparam int unsigned N = 8;
  localparam vq_pkg::dist_e METRIC = vq_pkg::DIST_SQUARED;
  localparam int unsigned W = 10;

  `include "vq_encoder_check.svh"

  // watchdog
  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vq_encoder_top #(.K(K), .N(N), .W(W)) dut (.*);
endmodule
