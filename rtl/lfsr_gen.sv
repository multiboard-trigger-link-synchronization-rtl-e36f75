// lfsr_gen: pseudorandom training stream source of the master unit (and of
// each backplane board, for training the ExtTrg inputs of the other boards).
//
// A 16-bit Fibonacci LFSR (polynomial in trig_pkg) advances once per clock
// while `en` is high and puts its newest bit on `bit_o`. Because the emitted
// bit is the one shifted into the register, the last 16 emitted bits equal
// the current state; a receiver can therefore take any 16 consecutive bits as
// its seed. `state_o` exposes the register for observation.
//
// Timing: `bit_o` is registered; it changes one clock after each enabled edge.
// Reset loads trig_pkg::LFSR_SEED (a non-zero value, an own choice: the
// LFSR must never hold all zeros). That the master generates an LFSR stream
// follows the training scheme; width and polynomial are this design's own.
module lfsr_gen
  import trig_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  output logic              bit_o,
  output logic [LFSR_W-1:0] state_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_o <= LFSR_SEED;
    end else if (en) begin
      state_o <= lfsr_next(state_o);
    end
  end

  assign bit_o = state_o[0];

endmodule
