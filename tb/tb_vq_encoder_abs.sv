// tb_vq_encoder_abs: end-to-end test of the systolic VQ encoder with the
// absolute-error cell function, at the default size (K = 3, N = 4, W = 8).
// Streams, formats and checks are those of tb_vq_encoder_top (see
// vq_encoder_check.svh); the reference distortion is the sum of absolute
// differences.
module tb_vq_encoder_abs;
  localparam int unsigned K = vq_pkg::K_DEFAULT;
  localparam int unsigned N = vq_pkg::N_DEFAULT;
  localparam vq_pkg::dist_e METRIC = vq_pkg::DIST_ABSOLUTE;
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

  vq_encoder_top #(.METRIC(METRIC)) dut (.*);
endmodule
