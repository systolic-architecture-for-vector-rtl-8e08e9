// vq_delay_wedge: skews the K components of a vector so that component n
// (counting from 1) reaches the array n-1 phi2 periods after component 1.
//
// The partial distortion travels one column to the right per phi2 period,
// so each column of the array must see its component of the input vector
// and of the codeword one period later than the column to its left. Column
// n has a chain of n-1 delay registers, all clocked by phi2 (here: enabled
// by en), as in the wedge drawn for K = 3 (no delay, one delay, two delays).
// Column 1 is a plain wire. Two identical wedges are used, one for the input
// vectors and one for the codewords.
module vq_delay_wedge #(
  parameter int unsigned K = vq_pkg::K_DEFAULT,
  parameter int unsigned W = vq_pkg::W_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] vec_in  [K],
  output logic signed [W-1:0] vec_out [K]
);

  assign vec_out[0] = vec_in[0];

  for (genvar n = 1; n < K; n++) begin : g_col
    logic signed [W-1:0] dl [n];  // dl[0] is the stage next to the input

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < n; s++) dl[s] <= '0;
      end else if (en) begin
        dl[0] <= vec_in[n];
        for (int s = 1; s < n; s++) dl[s] <= dl[s-1];
      end
    end

    assign vec_out[n] = dl[n-1];
  end

endmodule
