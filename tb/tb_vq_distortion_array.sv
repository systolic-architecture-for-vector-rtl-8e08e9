// tb_vq_distortion_array: checks the K x N squared-error array on its own.
// Two random vector streams (no zero slots: the array itself does not need
// them) are fed skewed by one phi2 period per column, input vectors at the
// top and codewords at the bottom, with a random phi2 enable. Input slot s
// and codeword slot q meet in row r when s + r = q + N - 1 - r; the
// distortion of that pair must leave row r exactly K enabled periods after
// they met in column 0.
module tb_vq_distortion_array;
  localparam int unsigned K  = 3;
  localparam int unsigned N  = 4;
  localparam int unsigned W  = 8;
  localparam int unsigned DW = vq_pkg::dist_width(W, K);
  localparam int S = 60;

  logic clk = 1'b0, rst_n = 1'b0, en;
  logic signed [W-1:0] x_top [K], u_bottom [K];
  logic [DW-1:0] row_dist [N];
  int checks = 0, failures = 0;
  int xs [S][K], cs [S][K];
  int t = 0;  // current phi2 period

  vq_distortion_array #(.K(K), .N(N), .W(W), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  always_comb begin
    for (int n = 0; n < K; n++) begin
      x_top[n]    = (t - n >= 0 && t - n < S) ? W'(xs[t-n][n]) : '0;
      u_bottom[n] = (t - n >= 0 && t - n < S) ? W'(cs[t-n][n]) : '0;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < S; s++)
      for (int n = 0; n < K; n++) begin
        xs[s][n] = int'($urandom_range(255, 0)) - 128;
        cs[s][n] = int'($urandom_range(255, 0)) - 128;
      end
    en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (t < S) begin
      en = ($urandom_range(4, 0) != 0);
      @(posedge clk);
      if (en) t <= t + 1;
      @(negedge clk);
      // pair that met in column 0 of row r in period t-K
      for (int r = 0; r < N; r++) begin
        int s, q;
        longint d;
        s = t - K - r;
        q = t - K - (N - 1 - r);
        if (s >= 0 && q >= 0 && s < S && q < S) begin
          d = 0;
          for (int n = 0; n < K; n++) d += longint'(xs[s][n] - cs[q][n]) * (xs[s][n] - cs[q][n]);
          checks++;
          if (longint'(row_dist[r]) != d) begin
            failures++;
            $display("FAIL period %0d row %0d: %0d expected %0d", t, r, row_dist[r], d);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
