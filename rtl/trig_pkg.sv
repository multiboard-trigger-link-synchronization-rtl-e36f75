// trig_pkg: types and constants shared by the trigger link training and
// trigger distribution logic.
//
// The training pattern is a 16-bit Fibonacci LFSR with the maximal-length
// polynomial x^16 + x^15 + x^13 + x^4 + 1. The pattern is sent one bit per
// clock on a trigger line; the bit shifted into the register is also the bit
// put on the line, so a receiver that shifts in 16 line bits holds exactly the
// transmitter's state and can continue the sequence on its own. The choice
// of an LFSR pattern follows the link training scheme; the width, polynomial
// and seed are this design's own choices.
//
// Board and master operating modes select what a trigger line carries:
// nothing, the training stream, the loopback test edge, or the Algorithm
// Enable level during normal operation. MODE_EXTLB runs the loopback test
// between boards over the ExtTrg lines; the master lines are then idle.
package trig_pkg;

  localparam int unsigned LFSR_W = 16;
  localparam logic [LFSR_W-1:0] LFSR_SEED = 16'hACE1;

  // Width of every cycle-delay value (Delay1/Delay2/Delay3, TrgDelay).
  localparam int unsigned DLY_W = 8;
  typedef logic [DLY_W-1:0] dly_t;

  typedef enum logic [2:0] {
    MODE_IDLE     = 3'd0,
    MODE_TRAIN    = 3'd1,
    MODE_LOOPBACK = 3'd2,
    MODE_RUN      = 3'd3,
    MODE_EXTLB    = 3'd4
  } link_mode_e;

  // Feedback bit of the LFSR for a given state.
  function automatic logic lfsr_fb(input logic [LFSR_W-1:0] s);
    return s[15] ^ s[14] ^ s[12] ^ s[3];
  endfunction

  // Next LFSR state: shift left, feedback enters at bit 0.
  function automatic logic [LFSR_W-1:0] lfsr_next(input logic [LFSR_W-1:0] s);
    return {s[LFSR_W-2:0], lfsr_fb(s)};
  endfunction

endpackage
