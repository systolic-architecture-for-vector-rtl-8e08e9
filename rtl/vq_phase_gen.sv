// vq_phase_gen: derives the two slower clock phases of the encoder from its
// single clock.
//
// The architecture uses three rates: phi1 for the serial sample buffers,
// phi2 = phi1 / K for the systolic array, the comparing cells and the offset
// adder, and phi2/2 for the mod-N offset counter. This design runs everything
// from one clock, clk, which plays the part of phi1, and turns phi2 and phi2/2
// into clock enables (a synchronous-design choice; the architecture draws
// them as separate clocks).
//
// Timing: after reset the phase counter runs 0, 1, .., K-1. phi2_tick is high
// in the clk cycle with phase K-1, so every phi2 period is K clk cycles long
// and its registers update on the last edge of the period. half_tick is
// phi2_tick on every second period (periods 1, 3, 5, .. counted from 0 at
// reset), which is the enable of the phi2/2 counter.
module vq_phase_gen #(
  parameter int unsigned K = vq_pkg::K_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  output logic phi2_tick,   // last phi1 cycle of a phi2 period
  output logic half_tick,   // phi2_tick of every odd period (phi2/2)
  output logic period_start // first phi1 cycle of a phi2 period
);

  localparam int unsigned PW = (K > 1) ? $clog2(K) : 1;

  logic [PW-1:0] phase;
  logic          odd_period;  // high during periods 1, 3, 5, ..

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= '0;
      odd_period <= 1'b0;
    end else begin
      if (phi2_tick) begin
        phase      <= '0;
        odd_period <= ~odd_period;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end

  assign phi2_tick    = (phase == PW'(K - 1));
  assign half_tick    = phi2_tick && odd_period;
  assign period_start = (phase == '0);

  a_phase_range: assert property (@(posedge clk) disable iff (!rst_n) int'(phase) < K);

endmodule
