// tap_trainer: input-delay tap search for one trigger line.
//
// The trainer sweeps the input delay element of a trigger line (a Xilinx
// IDELAYE2 in variable-load mode, outside this module) over all NTAPS taps.
// For every tap it:
//   1. puts the tap on `tap_o` and pulses `tap_ld_o`, then waits SETTLE clocks;
//   2. restarts the lfsr_checker, which latches one received word as seed;
//   3. runs the bitskip_monitor for T_CYCLES clocks on correctTransmission;
//   4. marks the tap good if the flag stayed 1 for the whole period.
// After the last tap it stops. Good taps are collected into windows of
// consecutive good taps; the widest window gives tapStart and tapEnd and the
// trainer loads tapOptimal = tapStart + (tapEnd - tapStart)/2 into the delay
// element. `link_ok_o` is 0 if no tap passed, which flags a broken line.
// `pass_map_o` keeps the per-tap verdicts for diagnostics.
//
// Follows the training algorithm: tap sweep from 0, seed latch, comparison,
// bitskip period, stop at the maximum tap and the mid-window formula. Own
// choices: NTAPS = 32 (the IDELAYE2 tap count), the settle time, choosing the
// widest window when several exist, and loading the result at the end.
//
// Timing: one tap takes SETTLE + LFSR_W + T_CYCLES + about 4 clocks.
module tap_trainer
  import trig_pkg::*;
#(
  parameter int unsigned NTAPS    = 32,
  parameter int unsigned T_CYCLES = 4096,
  parameter int unsigned SETTLE   = 8,
  localparam int unsigned TAP_W   = $clog2(NTAPS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,       // begin a sweep
  input  logic             din,         // delayed trigger line
  output logic [TAP_W-1:0] tap_o,       // to the delay element
  output logic             tap_ld_o,    // load strobe for tap_o
  output logic             busy_o,
  output logic             done_o,      // sweep finished (level)
  output logic             link_ok_o,   // at least one good tap
  output logic [TAP_W-1:0] tap_start_o,
  output logic [TAP_W-1:0] tap_end_o,
  output logic [TAP_W-1:0] tap_opt_o,
  output logic [NTAPS-1:0] pass_map_o,
  output logic             correct_o    // live correctTransmission
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_SETTLE, S_SEED, S_MON, S_NEXT, S_FINISH, S_DONE
  } state_e;

  localparam int unsigned SET_W = $clog2(SETTLE + 1);

  state_e           state_q;
  logic [TAP_W-1:0] tap_q;
  logic [SET_W-1:0] set_cnt_q;
  logic             chk_restart, mon_start;
  logic             seeded, valid;
  logic             mon_busy, mon_done, mon_pass, mon_changed;
  // current window of good taps and the widest one seen
  logic             in_win_q;
  logic [TAP_W-1:0] win_start_q;
  logic [TAP_W:0]   best_len_q;

  lfsr_checker u_chk (
    .clk, .rst_n, .restart(chk_restart), .din,
    .seeded_o(seeded), .valid_o(valid), .correct_o
  );

  bitskip_monitor #(.T_CYCLES(T_CYCLES)) u_mon (
    .clk, .rst_n, .start(mon_start), .flag(correct_o),
    .busy_o(mon_busy), .done_o(mon_done), .pass_o(mon_pass), .changed_o(mon_changed)
  );

  assign chk_restart = (state_q == S_SETTLE) && (set_cnt_q == '0);
  assign mon_start   = (state_q == S_SEED) && valid;
  assign busy_o      = (state_q != S_IDLE) && (state_q != S_DONE);
  assign done_o      = (state_q == S_DONE);
  assign tap_o       = tap_q;

  // length of the window that ends at tap_q
  logic [TAP_W:0] cur_len;
  assign cur_len = {1'b0, tap_q} - {1'b0, win_start_q} + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      tap_q       <= '0;
      tap_ld_o    <= 1'b0;
      set_cnt_q   <= '0;
      in_win_q    <= 1'b0;
      win_start_q <= '0;
      best_len_q  <= '0;
      tap_start_o <= '0;
      tap_end_o   <= '0;
      tap_opt_o   <= '0;
      link_ok_o   <= 1'b0;
      pass_map_o  <= '0;
    end else begin
      tap_ld_o <= 1'b0;
      unique case (state_q)
        S_IDLE, S_DONE: begin
          if (start) begin
            tap_q      <= '0;           // starting tap
            in_win_q   <= 1'b0;
            best_len_q <= '0;
            link_ok_o  <= 1'b0;
            pass_map_o <= '0;
            state_q    <= S_LOAD;
          end
        end
        S_LOAD: begin
          tap_ld_o  <= 1'b1;
          set_cnt_q <= SET_W'(SETTLE);
          state_q   <= S_SETTLE;
        end
        S_SETTLE: begin
          if (set_cnt_q == '0) state_q <= S_SEED;   // checker restarts now
          else set_cnt_q <= set_cnt_q - 1'b1;
        end
        S_SEED: begin
          if (valid) state_q <= S_MON;              // monitor starts now
        end
        S_MON: begin
          if (mon_done) begin
            pass_map_o[tap_q] <= mon_pass;
            if (mon_pass) begin
              link_ok_o <= 1'b1;
              if (!in_win_q) begin
                in_win_q    <= 1'b1;
                win_start_q <= tap_q;
                if (best_len_q == '0) begin
                  best_len_q  <= (TAP_W+1)'(1);
                  tap_start_o <= tap_q;
                  tap_end_o   <= tap_q;
                end
              end else if (cur_len > best_len_q) begin
                best_len_q  <= cur_len;
                tap_start_o <= win_start_q;
                tap_end_o   <= tap_q;
              end
            end else begin
              in_win_q <= 1'b0;
            end
            state_q <= S_NEXT;
          end
        end
        S_NEXT: begin
          if (tap_q == TAP_W'(NTAPS - 1)) begin
            state_q <= S_FINISH;                    // maximum tap reached
          end else begin
            tap_q   <= tap_q + 1'b1;
            state_q <= S_LOAD;
          end
        end
        S_FINISH: begin
          // tapOptimal = tapStart + (tapEnd - tapStart)/2
          tap_opt_o <= tap_start_o + ((tap_end_o - tap_start_o) >> 1);
          tap_q     <= link_ok_o ? tap_start_o + ((tap_end_o - tap_start_o) >> 1) : '0;
          tap_ld_o  <= 1'b1;
          state_q   <= S_DONE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // the tap must not move while a tap is being tested, and a good window
  // is never reported without a good tap
  a_tap_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state_q == S_MON) |-> !tap_ld_o && $stable(tap_q));
  a_window:     assert property (@(posedge clk) disable iff (!rst_n)
                                 done_o && link_ok_o |-> tap_start_o <= tap_end_o);

  logic unused;
  assign unused = seeded ^ mon_busy ^ mon_changed;

endmodule
