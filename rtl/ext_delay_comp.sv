// ext_delay_comp: Delay1/Delay2 settings of all boards from the ExtTrg
// loopback results.
//
// Board j measures, for every other board k, the one-way ExtTrg delay
// est[j][p] (p is k's position among j's partners, k < j ? k : k - 1).
// With D the largest of all these delays, every board must hold its own
// LocTrg D + EXT_EXTRA clocks (Delay1) and the trigger from board j
// D - est(j,k) clocks (Delay2), where EXT_EXTRA covers the ExtTrg output
// register and the receiver's resynchronization (3 clocks in
// backplane_board). Then an event on any board starts registration on all
// boards on the same clock. Outputs are registered (one clock).
//
// Detecting the maximum delay and compensating each line against it follows
// the multi-board compensation (Delay2 per receiving board); deriving
// Delay1/Delay2 from board-to-board loopback results in logic, rather than
// on the host, is this design's own choice. Values saturate at the delay
// width.
module ext_delay_comp
  import trig_pkg::*;
#(
  parameter int unsigned N_BOARDS  = 2,
  parameter int unsigned EXT_EXTRA = 3,
  localparam int unsigned N_EXT    = (N_BOARDS > 1) ? N_BOARDS - 1 : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  dly_t est_i    [N_BOARDS][N_EXT],   // est_i[j][p]: j to its p-th partner
  output dly_t max_o,
  output dly_t delay1_o [N_BOARDS],
  output dly_t delay2_o [N_BOARDS][N_EXT]    // delay2_o[k][p]: k from its p-th partner
);

  dly_t max_c;

  always_comb begin
    max_c = '0;
    for (int j = 0; j < int'(N_BOARDS); j++)
      for (int p = 0; p < int'(N_EXT); p++)
        if (N_BOARDS > 1 && est_i[j][p] > max_c) max_c = est_i[j][p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_o <= '0;
      for (int k = 0; k < int'(N_BOARDS); k++) begin
        delay1_o[k] <= '0;
        for (int p = 0; p < int'(N_EXT); p++) delay2_o[k][p] <= '0;
      end
    end else begin
      max_o <= max_c;
      for (int k = 0; k < int'(N_BOARDS); k++) begin
        delay1_o[k] <= (int'(max_c) + int'(EXT_EXTRA) > int'({DLY_W{1'b1}})) ?
                       '1 : dly_t'(int'(max_c) + int'(EXT_EXTRA));
        for (int p = 0; p < int'(N_EXT); p++) begin
          // partner p of board k is board j; board k is partner q of board j
          automatic int j = (p < k) ? p : p + 1;
          automatic int q = (k < j) ? k : k - 1;
          if (N_BOARDS > 1) delay2_o[k][p] <= max_c - est_i[j][q];
        end
      end
    end
  end

endmodule
