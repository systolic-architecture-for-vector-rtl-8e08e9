// vq_distortion_array: the K x N systolic distortion calculator.
//
// Row r (0-based, top to bottom) and column n (0-based, left to right) hold
// one vq_se_cell. Input vectors enter at the top and move down one row per
// phi2 period; codewords enter at the bottom and move up one row per period;
// partial distortions enter each row as 0 at the left and move one column
// right per period. Because the two vector streams move in opposite
// directions and the host separates consecutive vectors of each stream by
// one empty (zero) slot, an input vector meets a new codeword in every row
// it passes. Component n of both streams must arrive n periods after
// component 0 (see vq_delay_wedge), so that the sum of a row, leaving its
// last column, is the full distortion of eqn. (1) between the input vector
// and the codeword that met in that row.
//
// Timing: if an input vector and a codeword are both at the inputs of row r,
// column 0, in period t, then row_dist[r] carries their distortion in period
// t + K.
//
// METRIC is passed to every cell (squared error by default).
module vq_distortion_array #(
  parameter vq_pkg::dist_e METRIC = vq_pkg::DIST_SQUARED,
  parameter int unsigned K  = vq_pkg::K_DEFAULT,
  parameter int unsigned N  = vq_pkg::N_DEFAULT,
  parameter int unsigned W  = vq_pkg::W_DEFAULT,
  parameter int unsigned DW = vq_pkg::dist_width(W, K)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,            // phi2 enable
  input  logic signed [W-1:0]  x_top    [K],  // skewed input vector, into row 0
  input  logic signed [W-1:0]  u_bottom [K],  // skewed codeword, into row N-1
  output logic        [DW-1:0] row_dist     [N]   // distortion leaving each row
);

  // x[r][n]: input-vector component entering row r; x[N] leaves the array.
  // u[r][n]: codeword component entering row r from below; u[r] for r < N-1
  //          is driven by row r+1, u[N-1] by the bottom input. What row 0
  //          passes upward leaves the array unused.
  // a[r][n]: partial sum entering column n of row r; a[r][K] leaves the row.
  logic signed [W-1:0]  x [N+1][K];
  logic signed [W-1:0]  u [N][K];
  logic        [DW-1:0] a [N][K+1];

  for (genvar n = 0; n < K; n++) begin : g_edge
    assign x[0][n]   = x_top[n];
    assign u[N-1][n] = u_bottom[n];
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    assign a[r][0] = '0;
    assign row_dist[r] = a[r][K];
    for (genvar n = 0; n < K; n++) begin : g_col
      logic signed [W-1:0] v_up;  // codeword component leaving upward
      vq_se_cell #(.METRIC(METRIC), .W(W), .DW(DW)) u_cell (
        .clk  (clk),
        .rst_n(rst_n),
        .en   (en),
        .x_in (x[r][n]),
        .u_in (u[r][n]),
        .a_in (a[r][n]),
        .y_out(x[r+1][n]),
        .v_out(v_up),
        .a_out(a[r][n+1])
      );
      if (r > 0) begin : g_up
        assign u[r-1][n] = v_up;
      end
    end
  end

endmodule
