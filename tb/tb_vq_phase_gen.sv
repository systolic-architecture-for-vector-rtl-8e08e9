// tb_vq_phase_gen: checks the clock-phase generator for K = 3 (the default)
// and K = 5. Counting clock cycles from reset, phi2_tick must be high
// exactly in cycles c with c mod K = K-1, period_start in cycles with
// c mod K = 0, and half_tick exactly on the phi2_tick of odd periods
// (floor(c / K) odd).
module tb_vq_phase_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic t3, h3, s3, t5, h5, s5;
  int checks = 0, failures = 0, halves = 0;

  vq_phase_gen #(.K(3)) dut3 (.clk(clk), .rst_n(rst_n), .phi2_tick(t3), .half_tick(h3), .period_start(s3));
  vq_phase_gen #(.K(5)) dut5 (.clk(clk), .rst_n(rst_n), .phi2_tick(t5), .half_tick(h5), .period_start(s5));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 300; c++) begin
      checks++;
      if (t3 != (c % 3 == 2) || s3 != (c % 3 == 0) || h3 != (c % 3 == 2 && (c / 3) % 2 == 1) ||
          t5 != (c % 5 == 4) || s5 != (c % 5 == 0) || h5 != (c % 5 == 4 && (c / 5) % 2 == 1)) begin
        failures++;
        $display("FAIL cycle %0d: %b%b%b %b%b%b", c, t3, s3, h3, t5, s5, h5);
      end
      if (h3) halves++;
      @(negedge clk);
    end
    checks++;
    if (halves != 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
