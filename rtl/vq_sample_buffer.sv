// vq_sample_buffer: serial-to-parallel buffer for one sample stream (input
// vectors or codewords).
//
// Samples arrive one per phi1 (clk) cycle, component 1 first. A shift
// register of K-1 stages collects the first K-1 samples of a phi2 period;
// on the period's last edge (phi2_tick) the K-th sample on sample_in and the
// K-1 stored ones are loaded together into the vector register vec_out. The
// vector therefore stays stable for the whole following phi2 period while
// the array reads it, so samples can enter back to back without a gap. The
// architecture only states that a vector is formed and loaded once the
// buffer holds K samples; the separate output register is this design's way
// of making the load take no time.
//
// Interface: sample_in is W bits signed, vec_out[0] is component 1.
// Latency: the vector whose samples enter in phi2 period p is on vec_out
// during period p+1.
module vq_sample_buffer #(
  parameter int unsigned K = vq_pkg::K_DEFAULT,
  parameter int unsigned W = vq_pkg::W_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                phi2_tick,
  input  logic signed [W-1:0] sample_in,
  output logic signed [W-1:0] vec_out [K]
);

  if (K > 1) begin : g_shift
    logic signed [W-1:0] sh [K-1];  // sh[0] holds the oldest sample

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int n = 0; n < K - 1; n++) sh[n] <= '0;
      end else begin
        for (int n = 0; n < K - 2; n++) sh[n] <= sh[n+1];
        sh[K-2] <= sample_in;
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int n = 0; n < K; n++) vec_out[n] <= '0;
      end else if (phi2_tick) begin
        for (int n = 0; n < K - 1; n++) vec_out[n] <= sh[n];
        vec_out[K-1] <= sample_in;
      end
    end
  end else begin : g_single
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)         vec_out[0] <= '0;
      else if (phi2_tick) vec_out[0] <= sample_in;
    end
  end

endmodule
