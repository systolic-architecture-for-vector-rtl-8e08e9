// vq_index_offset: turns the row identifier found by the index selector
// into the index of the codeword, without feeding identifier streams.
//
// Input vector j (from 0) meets codewords j, j+1, .., j+N-1 (mod N) in rows
// 0 .. N-1, so the winning row r stands for codeword (r + j) mod N. One
// mod-N counter supplies the offset j and one adder forms the sum; for N a
// power of two the adder is a plain log2(N)-bit adder that wraps by itself.
// The counter advances on every second phi2 period (the phi2/2 enable,
// half_en), because consecutive input vectors are two phi2 periods apart;
// the adder output is registered on every phi2 period (en).
//
// INIT is the counter value after reset. The architecture gives it as
// N - floor(K/2) (3 for K = 3, N = 4). With the phase and latency
// conventions of vq_encoder_top this is the value that makes the counter
// show offset 0 when the first input vector's result arrives; it is kept as
// a parameter so that a different pipeline can retune it.
module vq_index_offset #(
  parameter int unsigned N    = vq_pkg::N_DEFAULT,
  parameter int unsigned K    = vq_pkg::K_DEFAULT,
  parameter int unsigned IW   = vq_pkg::id_width(N),
  parameter int unsigned INIT = (N - (K / 2) % N) % N
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,        // phi2 enable
  input  logic          half_en,   // phi2/2 enable, counter step
  input  logic [IW-1:0] row_id,    // winning row from the index selector
  output logic [IW-1:0] index,     // codeword index, registered
  output logic [IW-1:0] offset     // current counter value (observability)
);

  logic [IW:0] sum;  // one extra bit for the mod-N wrap when N is not 2^IW

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset <= IW'(INIT);
    end else if (half_en) begin
      offset <= (offset == IW'(N - 1)) ? '0 : offset + 1'b1;
    end
  end

  always_comb begin
    sum = {1'b0, row_id} + {1'b0, offset};
    if (sum >= (IW+1)'(N)) sum = sum - (IW+1)'(N);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  index <= '0;
    else if (en) index <= sum[IW-1:0];
  end

  // The counter steps only on phi2 edges, and identifiers and the offset
  // stay within 0 .. N-1.
  a_half_on_phi2: assert property (@(posedge clk) disable iff (!rst_n) half_en |-> en);
  a_row_range:    assert property (@(posedge clk) disable iff (!rst_n) en |-> int'(row_id) < N);
  a_off_range:    assert property (@(posedge clk) disable iff (!rst_n) int'(offset) < N);

endmodule
