// trig_delay: programmable whole-clock delay of one trigger signal.
//
// The trigger is shifted through a MAX_DELAY-deep shift register every
// clock; `delay` selects which stage drives the output. A delay of 0 passes
// the input straight through (no register), so the delay is exactly `delay`
// clocks. Values above MAX_DELAY are clipped to MAX_DELAY. These are the
// Delay1/Delay2/Delay3 elements of the in-FPGA trigger distribution; their
// depth (64 clocks) and the shift-register form are this design's choices.
module trig_delay
  import trig_pkg::*;
#(
  parameter int unsigned MAX_DELAY = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  dly_t delay,
  input  logic d,
  output logic q
);

  localparam int unsigned IDX_W = (MAX_DELAY > 1) ? $clog2(MAX_DELAY) : 1;

  logic [MAX_DELAY-1:0] sr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr_q <= '0;
    else        sr_q <= {sr_q[MAX_DELAY-2:0], d};
  end

  always_comb begin
    if (delay == '0)                          q = d;
    else if (delay >= dly_t'(MAX_DELAY))      q = sr_q[MAX_DELAY-1];
    else                                      q = sr_q[IDX_W'(delay - 1'b1)];
  end

endmodule
