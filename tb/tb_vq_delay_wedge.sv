// tb_vq_delay_wedge: checks the delay wedge for K = 3 and K = 4. Random
// vectors are applied, one per enabled phi2 period, with a random enable.
// In period t, component n of the output must be component n of the vector
// applied in period t - n (counted in enabled periods); component 0 passes
// straight through.
module tb_vq_delay_wedge;
  localparam int unsigned W = 8;
  localparam int unsigned KA = 3, KB = 4;
  localparam int P = 80;

  logic clk = 1'b0, rst_n = 1'b0, en;
  logic signed [W-1:0] ia [KA], oa [KA];
  logic signed [W-1:0] ib [KB], ob [KB];
  int checks = 0, failures = 0;
  int xv [P][KB];
  int t = 0;

  vq_delay_wedge #(.K(KA), .W(W)) dut_a (.clk(clk), .rst_n(rst_n), .en(en), .vec_in(ia), .vec_out(oa));
  vq_delay_wedge #(.K(KB), .W(W)) dut_b (.clk(clk), .rst_n(rst_n), .en(en), .vec_in(ib), .vec_out(ob));

  always #5 clk = ~clk;

  always_comb begin
    for (int n = 0; n < KA; n++) ia[n] = (t < P) ? W'(xv[t][n]) : '0;
    for (int n = 0; n < KB; n++) ib[n] = (t < P) ? W'(xv[t][n] + 1) : '0;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < P; p++)
      for (int n = 0; n < KB; n++) xv[p][n] = int'($urandom_range(200, 0)) - 100;
    en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (t < P - 1) begin
      en = ($urandom_range(3, 0) != 0);
      @(posedge clk);
      if (en) t <= t + 1;
      @(negedge clk);
      for (int n = 0; n < KB; n++) begin
        int ea, eb;
        ea = (t - n >= 0) ? xv[t-n][n] : 0;
        eb = (t - n >= 0) ? xv[t-n][n] + 1 : 0;
        checks++;
        if ((n < KA && int'(oa[n]) != ea) || int'(ob[n]) != eb) begin
          failures++;
          $display("FAIL period %0d component %0d", t, n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
