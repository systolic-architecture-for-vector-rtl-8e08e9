// tb_vq_sample_buffer: checks the serial-to-parallel buffer. Random samples
// enter one per clock, K per phi2 period, with phi2_tick on the last clock
// of each period. During period p+1 the vector output must hold, component
// 1 first, the K samples that entered in period p, unchanged for all K
// clocks of the period. Run for K = 3 and K = 5.
module tb_vq_sample_buffer;
  localparam int unsigned W = 8;
  localparam int unsigned KA = 3, KB = 5;
  localparam int P = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tick_a, tick_b;
  logic signed [W-1:0] sa, sb;
  logic signed [W-1:0] va [KA];
  logic signed [W-1:0] vb [KB];
  int checks = 0, failures = 0;
  int xa [P][KA], xb [P][KB];
  int cyc = 0;

  vq_sample_buffer #(.K(KA), .W(W)) dut_a (.clk(clk), .rst_n(rst_n), .phi2_tick(tick_a), .sample_in(sa), .vec_out(va));
  vq_sample_buffer #(.K(KB), .W(W)) dut_b (.clk(clk), .rst_n(rst_n), .phi2_tick(tick_b), .sample_in(sb), .vec_out(vb));

  always #5 clk = ~clk;

  always_comb begin
    tick_a = (cyc % KA == KA - 1);
    tick_b = (cyc % KB == KB - 1);
    sa = (cyc / KA < P) ? W'(xa[cyc/KA][cyc%KA]) : '0;
    sb = (cyc / KB < P) ? W'(xb[cyc/KB][cyc%KB]) : '0;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < P; p++) begin
      for (int n = 0; n < KA; n++) xa[p][n] = int'($urandom_range(255, 0)) - 128;
      for (int n = 0; n < KB; n++) xb[p][n] = int'($urandom_range(255, 0)) - 128;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (cyc < P * KB) begin
      @(posedge clk);
      cyc <= cyc + 1;
      @(negedge clk);
      if (cyc / KA >= 1 && cyc / KA <= P) begin
        bit bad;
        bad = 1'b0;
        checks++;
        for (int n = 0; n < KA; n++)
          if (int'(va[n]) != xa[cyc/KA-1][n]) begin
            bad = 1'b1;
            $display("FAIL K=%0d cycle %0d component %0d: %0d expected %0d", KA, cyc, n, va[n], xa[cyc/KA-1][n]);
          end
        if (bad) failures++;
      end
      if (cyc / KB >= 1 && cyc / KB <= P) begin
        bit bad;
        bad = 1'b0;
        checks++;
        for (int n = 0; n < KB; n++)
          if (int'(vb[n]) != xb[cyc/KB-1][n]) begin
            bad = 1'b1;
            $display("FAIL K=%0d cycle %0d component %0d: %0d expected %0d", KB, cyc, n, vb[n], xb[cyc/KB-1][n]);
          end
        if (bad) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
