// tb_vq_encoder_top: end-to-end test of the systolic VQ encoder at its
// default size (K = 3, N = 4, W = 8). It streams a recirculating codebook
// and input vectors first in the 50%-efficiency format and then in the
// 100%-efficiency format, and checks every index and distortion against a
// reference computed from the streams, together with the K + N + 1 period
// latency and the result rate (see vq_encoder_check.svh).
module tb_vq_encoder_top;
  localparam int unsigned K = vq_pkg::K_DEFAULT;
  localparam int unsigned N = vq_pkg::N_DEFAULT;
  localparam vq_pkg::dist_e METRIC = vq_pkg::DIST_SQUARED;
  localparam int unsigned W = vq_pkg::W_DEFAULT;

  `include "vq_encoder_check.svh"

  // watchdog
  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vq_encoder_top dut (.*);
endmodule
