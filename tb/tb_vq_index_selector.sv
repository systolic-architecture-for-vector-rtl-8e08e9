// tb_vq_index_selector: checks the column of comparing cells. Vector j's
// distortion in row r is presented in phi2 period j + r (the skew of the
// array); distortions come from a small range so that ties are frequent.
// In period j + N the column must deliver the minimum over the N rows and
// the row that holds it, the later row on a tie.
module tb_vq_index_selector;
  localparam int unsigned N  = 4;
  localparam int unsigned DW = 8;
  localparam int unsigned IW = vq_pkg::id_width(N);
  localparam int S = 200;

  logic clk = 1'b0, rst_n = 1'b0, en;
  logic [DW-1:0] row_dist [N];
  logic [DW-1:0] min_dist;
  logic [IW-1:0] min_id;
  int checks = 0, failures = 0, ties = 0;
  int dd [S][N];
  int wins [N];
  int t = 0;

  vq_index_selector #(.N(N), .DW(DW), .IW(IW)) dut (.*);

  always #5 clk = ~clk;

  always_comb
    for (int r = 0; r < N; r++)
      row_dist[r] = (t - r >= 0 && t - r < S) ? DW'(dd[t-r][r]) : '0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < S; j++)
      for (int r = 0; r < N; r++)
        dd[j][r] = (j % 3 == 0) ? $urandom_range(255, 0) : $urandom_range(6, 0);
    for (int r = 0; r < N; r++) wins[r] = 0;
    en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (t < S + N) begin
      en = ($urandom_range(4, 0) != 0);
      @(posedge clk);
      if (en) t <= t + 1;
      @(negedge clk);
      if (t - N >= 0 && t - N < S) begin
        int j, best, brow, nb;
        j = t - N;
        best = dd[j][0]; brow = 0; nb = 1;
        for (int r = 1; r < N; r++)
          if (dd[j][r] <= best) begin
            nb = (dd[j][r] == best) ? nb + 1 : 1;
            best = dd[j][r]; brow = r;
          end
        if (nb > 1) ties++;
        checks++;
        if (int'(min_dist) != best || int'(min_id) != brow) begin
          failures++;
          $display("FAIL vector %0d: %0d/%0d expected %0d/%0d", j, min_dist, min_id, best, brow);
        end
        // count each distinct vector once (t advances only when enabled)
        if (en) wins[brow]++;
      end
    end
    for (int r = 0; r < N; r++) begin
      checks++;
      if (wins[r] == 0) failures++;
    end
    checks++;
    if (ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
