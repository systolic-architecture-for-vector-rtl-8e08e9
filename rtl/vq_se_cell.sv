// vq_se_cell: squared-error cell of the systolic distortion calculator.
//
// Each phi2 period the cell takes an input-vector component x from above, a
// codeword component u from below and a partial distortion a from the left,
// and registers
//     a_out <= a + (x - u)^2,   y_out <= x,   v_out <= u,
// i.e. it adds one term of the sum of eqn. (1) and passes x down, u up and
// the sum to the right, one period later. This is the cell function of the
// architecture; the register on every output is what makes the array
// systolic. Samples are signed W-bit values (design choice), (x - u) is
// formed on W+1 bits, and its square (at most (2^W - 1)^2) on 2W bits. The
// sum is DW bits wide; with the default DW of vq_pkg::dist_width it cannot
// overflow.
//
// METRIC selects the term: DIST_SQUARED (default) adds (x - u)^2,
// DIST_ABSOLUTE adds |x - u| for an absolute-value distortion measure, the
// one cell change needed to turn the encoder into an absolute-error matcher.
module vq_se_cell #(
  parameter vq_pkg::dist_e METRIC = vq_pkg::DIST_SQUARED,
  parameter int unsigned W  = vq_pkg::W_DEFAULT,
  parameter int unsigned DW = vq_pkg::dist_width(vq_pkg::W_DEFAULT, vq_pkg::K_DEFAULT)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,     // phi2 enable
  input  logic signed [W-1:0]  x_in,   // input-vector component, from above
  input  logic signed [W-1:0]  u_in,   // codeword component, from below
  input  logic        [DW-1:0] a_in,   // partial distortion, from the left
  output logic signed [W-1:0]  y_out,  // x passed down
  output logic signed [W-1:0]  v_out,  // u passed up
  output logic        [DW-1:0] a_out   // partial distortion, to the right
);

  logic signed [W:0]    diff;
  logic signed [2*W:0]  sq;    // diff * diff, never negative; bit 2W stays 0
  logic        [W:0]    mag;   // |diff|, at most 2^W
  logic        [2*W-1:0] term;

  always_comb begin
    diff = x_in - u_in;   // sign-extended to W+1 bits by the context
    sq   = diff * diff;   // sign-extended to 2W+1 bits by the context
    mag  = diff[W] ? (W+1)'(-diff) : (W+1)'(diff);
    if (METRIC == vq_pkg::DIST_ABSOLUTE)
      term = (2*W)'(mag);
    else
      term = sq[2*W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out <= '0;
      v_out <= '0;
      a_out <= '0;
    end else if (en) begin
      y_out <= x_in;
      v_out <= u_in;
      a_out <= a_in + DW'(term);
    end
  end

endmodule
