// vq_encoder_top: systolic vector quantisation encoder with squared-error
// distortion.
//
// For every input vector X of K samples the encoder finds the index i of the
// codeword C_i of an N-word codebook that minimises sum_n (x_n - c_n)^2.
// Input vectors and codewords arrive as two serial sample streams. Each
// stream passes a serial-to-parallel buffer (vq_sample_buffer) and a delay
// wedge (vq_delay_wedge), then the input vectors flow down and the codewords
// flow up through a K x N array of squared-error cells
// (vq_distortion_array). Every row adds up the distortion of the pair that
// met in it, a column of N comparing cells (vq_index_selector) keeps the
// running minimum and the row where it occurred, and a mod-N counter plus an
// adder (vq_index_offset) turn that row into the codeword index. No
// codeword identifiers enter the chip.
//
// Clocking: clk is the sample clock phi1; one phi2 period is K clk cycles
// (vq_phase_gen). Samples are taken on every clk edge, component 1 first,
// one vector slot per phi2 period, beginning with the first edge after
// rst_n rises (slot 0).
//
// Stream format (the host's job, as in the architecture):
//   * codeword stream: slot 2m carries codeword (m mod N), the codebook
//     recirculating without end;
//   * input stream: delayed by N-1 slots against the codeword stream, so
//     slot N-1+2j carries input vector j (j = 0, 1, ..);
//   * 50% efficiency: the slots in between (2m+1 of the codeword stream,
//     N+2j of the input stream) hold zero vectors;
//   * 100% efficiency: slot N+2j of the input stream carries a further
//     input vector, and slot 2m+1 of the codeword stream carries
//     codeword ((m + K mod 2) mod N). The phi2/2 offset counter then gives
//     the right offset for these vectors too. (For odd K, such as the K = 3
//     example, this is codeword m+1; the even-K rule is this design's
//     derivation.)
//
// Timing: an input vector in slot s reaches row 0 of the array in phi2
// period s+1 and its index appears in period s+N+K+2, i.e. K+N+1 phi2
// periods after it enters the array. index and min_dist hold one result per
// phi2 period; result_valid pulses in the first clk cycle of every period
// from period 2N+K+1 on, the first that can hold a real result. Which
// periods hold results of real input vectors follows from the stream
// format above (every second one at 50% efficiency, every one at 100%).
// min_dist is brought out beside the index for observability; the
// architecture's output is the index alone.
//
// METRIC selects the distortion measure of the cells: squared error (the
// default, and the subject of this design) or absolute error, which needs
// nothing but the different cell function.
module vq_encoder_top #(
  parameter int unsigned K = vq_pkg::K_DEFAULT,
  parameter int unsigned N = vq_pkg::N_DEFAULT,
  parameter int unsigned W = vq_pkg::W_DEFAULT,
  parameter vq_pkg::dist_e METRIC = vq_pkg::DIST_SQUARED,
  localparam int unsigned DW = vq_pkg::dist_width(W, K),
  localparam int unsigned IW = vq_pkg::id_width(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x_sample,     // input-vector sample stream
  input  logic signed [W-1:0] c_sample,     // codeword sample stream
  output logic        [IW-1:0] index,       // encoding result
  output logic        [DW-1:0] min_dist,    // its distortion
  output logic                 result_valid // one pulse per phi2 period
);

  localparam int unsigned FIRST_RESULT = 2 * N + K + 1;
  localparam int unsigned PCW = $clog2(FIRST_RESULT + 1);

  logic phi2_tick, half_tick, period_start;

  vq_phase_gen #(.K(K)) u_phase (
    .clk         (clk),
    .rst_n       (rst_n),
    .phi2_tick   (phi2_tick),
    .half_tick   (half_tick),
    .period_start(period_start)
  );

  logic signed [W-1:0] x_vec [K], c_vec [K];
  logic signed [W-1:0] x_skw [K], c_skw [K];

  vq_sample_buffer #(.K(K), .W(W)) u_xbuf (
    .clk(clk), .rst_n(rst_n), .phi2_tick(phi2_tick),
    .sample_in(x_sample), .vec_out(x_vec)
  );
  vq_sample_buffer #(.K(K), .W(W)) u_cbuf (
    .clk(clk), .rst_n(rst_n), .phi2_tick(phi2_tick),
    .sample_in(c_sample), .vec_out(c_vec)
  );

  vq_delay_wedge #(.K(K), .W(W)) u_xwedge (
    .clk(clk), .rst_n(rst_n), .en(phi2_tick), .vec_in(x_vec), .vec_out(x_skw)
  );
  vq_delay_wedge #(.K(K), .W(W)) u_cwedge (
    .clk(clk), .rst_n(rst_n), .en(phi2_tick), .vec_in(c_vec), .vec_out(c_skw)
  );

  logic [DW-1:0] row_dist [N];

  vq_distortion_array #(.METRIC(METRIC), .K(K), .N(N), .W(W), .DW(DW)) u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (phi2_tick),
    .x_top   (x_skw),
    .u_bottom(c_skw),
    .row_dist    (row_dist)
  );

  logic [DW-1:0] sel_dist;
  logic [IW-1:0] sel_id;

  vq_index_selector #(.N(N), .DW(DW), .IW(IW)) u_select (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (phi2_tick),
    .row_dist    (row_dist),
    .min_dist(sel_dist),
    .min_id  (sel_id)
  );

  logic [IW-1:0] offset;

  vq_index_offset #(.N(N), .K(K), .IW(IW)) u_offset (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (phi2_tick),
    .half_en(half_tick),
    .row_id (sel_id),
    .index  (index),
    .offset (offset)
  );

  // Distortion register, in step with the index register of u_offset.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          min_dist <= '0;
    else if (phi2_tick)  min_dist <= sel_dist;
  end

  // Count phi2 periods up to the first one that can hold a real result.
  logic [PCW-1:0] period_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_cnt <= '0;
    end else if (phi2_tick && period_cnt != PCW'(FIRST_RESULT)) begin
      period_cnt <= period_cnt + 1'b1;
    end
  end

  assign result_valid = period_start && (period_cnt == PCW'(FIRST_RESULT));

endmodule
