// vq_index_selector: the column of N comparing cells that finds, for each
// input vector, the row in which its distortion was smallest.
//
// Cell r (0-based) takes the distortion leaving row r of the array and the
// running minimum from cell r-1. Cell 0 has nothing above it; it is fed the
// largest representable distortion, so it always takes its own row (this
// top input is this design's choice). An input vector reaches row r one phi2
// period after row r-1, and so does the running minimum, so the minimum of
// a vector ripples down the column together with it.
//
// Timing: the distortion of row r in period t+r leads to min_dist/min_id for
// rows 0..N-1 in period t + N. min_id is the row number, not yet the
// codeword index (see vq_index_offset).
module vq_index_selector #(
  parameter int unsigned N  = vq_pkg::N_DEFAULT,
  parameter int unsigned DW = vq_pkg::dist_width(vq_pkg::W_DEFAULT, vq_pkg::K_DEFAULT),
  parameter int unsigned IW = vq_pkg::id_width(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,         // phi2 enable
  input  logic [DW-1:0] row_dist [N],   // current distortion of each row
  output logic [DW-1:0] min_dist,   // minimum leaving the last cell
  output logic [IW-1:0] min_id      // row identifier of that minimum
);

  logic [DW-1:0] zc [N+1];
  logic [IW-1:0] ic [N+1];

  assign zc[0] = '1;
  assign ic[0] = '0;

  for (genvar r = 0; r < N; r++) begin : g_cell
    vq_compare_cell #(.DW(DW), .IW(IW), .ID(r)) u_cmp (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .b    (zc[r]),
      .ib   (ic[r]),
      .c    (row_dist[r]),
      .z    (zc[r+1]),
      .iz   (ic[r+1])
    );
  end

  assign min_dist = zc[N];
  assign min_id   = ic[N];

endmodule
