// trig_dist: trigger distribution inside one backplane FPGA.
//
// Three kinds of trigger reach the board: the global Algorithm Enable, the
// ExtTrg lines driven by the other boards, and the board's own LocTrg. Each
// passes its own programmable delay: Delay3 on Algorithm Enable, one Delay2
// per ExtTrg line, Delay1 on LocTrg. Data registration starts when the
// delayed Algorithm Enable is high and at least one of the delayed ExtTrg
// or LocTrg signals is high, so an event seen by any board starts
// registration on every enabled board. The delayed Algorithm Enable is also
// brought out (`ae_o`) to synchronize the timestamp counter.
//
// The three delays and the way the signals combine follow the board's
// trigger distribution scheme; having one Delay2 per incoming ExtTrg line
// is this design's reading of the multi-board compensation. `reg_start_o`
// is registered: it follows the delayed inputs by one clock.
module trig_dist
  import trig_pkg::*;
#(
  parameter int unsigned N_EXT     = 1,
  parameter int unsigned MAX_DELAY = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ae_i,                 // Algorithm Enable (resynchronized)
  input  logic ext_trg_i [N_EXT],    // ExtTrg from other boards (resynchronized)
  input  logic loc_trg_i,            // LocTrg
  input  dly_t delay1,               // LocTrg delay
  input  dly_t delay2    [N_EXT],    // per-ExtTrg delay
  input  dly_t delay3,               // Algorithm Enable delay
  output logic ae_o,                 // delayed Algorithm Enable
  output logic reg_start_o           // Data registration start
);

  logic ext_d [N_EXT];
  logic loc_d;
  logic any_trg;

  trig_delay #(.MAX_DELAY(MAX_DELAY)) u_d3 (.clk, .rst_n, .delay(delay3), .d(ae_i), .q(ae_o));
  trig_delay #(.MAX_DELAY(MAX_DELAY)) u_d1 (.clk, .rst_n, .delay(delay1), .d(loc_trg_i), .q(loc_d));

  for (genvar i = 0; i < int'(N_EXT); i++) begin : g_ext
    trig_delay #(.MAX_DELAY(MAX_DELAY)) u_d2 (
      .clk, .rst_n, .delay(delay2[i]), .d(ext_trg_i[i]), .q(ext_d[i])
    );
  end

  always_comb begin
    any_trg = loc_d;
    for (int i = 0; i < int'(N_EXT); i++) any_trg = any_trg | ext_d[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reg_start_o <= 1'b0;
    else        reg_start_o <= ae_o & any_trg;
  end

endmodule
