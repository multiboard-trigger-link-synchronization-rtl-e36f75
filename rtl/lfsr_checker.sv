// lfsr_checker: receiving side of the LFSR link test.
//
// After `restart` the checker shifts LFSR_W incoming bits into a receive
// register. That first complete word becomes the seed of a local LFSR, which
// from then on runs by itself, one step per clock, independent of the line.
// Each following clock the newest received word (the last LFSR_W line bits)
// is compared with the newest locally generated word, and `correct_o`
// (correctTransmission) shows the result. A bit that is skipped, doubled or
// sampled wrongly shifts the received stream against the local one, so the
// comparison keeps failing until the next restart.
//
// An all-zero seed would make the local LFSR stick at zero and agree with a
// dead line; such a seed is refused (`correct_o` stays 0), which turns a stuck
// line into a reported fault. This refusal is an own addition.
//
// Timing: `seeded_o` rises LFSR_W clocks after the restart cycle; `valid_o`
// and `correct_o` are first meaningful one clock later and are then updated
// every clock. The seed-latch/compare scheme follows the training algorithm;
// comparing a sliding word each clock is this design's reading of it.
module lfsr_checker
  import trig_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic restart,    // drop the seed and latch a new one
  input  logic din,        // sampled trigger line
  output logic seeded_o,   // first word latched
  output logic valid_o,    // correct_o carries a comparison result
  output logic correct_o   // correctTransmission
);

  localparam int unsigned CNT_W = $clog2(LFSR_W + 1);

  logic [LFSR_W-1:0] rx_q;     // last LFSR_W received bits
  logic [LFSR_W-1:0] local_q;  // local generator
  logic [CNT_W-1:0]  fill_q;   // bits collected since restart
  logic [LFSR_W-1:0] rx_next;

  assign rx_next = {rx_q[LFSR_W-2:0], din};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_q      <= '0;
      local_q   <= '0;
      fill_q    <= '0;
      seeded_o  <= 1'b0;
      valid_o   <= 1'b0;
      correct_o <= 1'b0;
    end else if (restart) begin
      fill_q    <= '0;
      seeded_o  <= 1'b0;
      valid_o   <= 1'b0;
      correct_o <= 1'b0;
    end else begin
      rx_q <= rx_next;
      if (!seeded_o) begin
        if (fill_q == CNT_W'(LFSR_W - 1)) begin
          // this clock completes the first word: it is the seed
          local_q  <= rx_next;
          seeded_o <= 1'b1;
        end
        fill_q <= fill_q + 1'b1;
      end else begin
        local_q   <= lfsr_next(local_q);
        valid_o   <= 1'b1;
        correct_o <= (rx_next == lfsr_next(local_q)) && (local_q != '0);
      end
    end
  end

endmodule
