// pcb_delay_line: behavioural model of a trigger line between two boards.
//
// Cables, MLVDS transceivers, level translators and buffers together delay
// the signal; here the delay is a whole number of clocks, `delay_cycles`
// (0 to 63), fixed during a test. Used only by the testbenches.
module pcb_delay_line (
  input  logic clk,
  input  int   delay_cycles,
  input  logic d,
  output logic q
);
  logic [63:0] sr = '0;
  always @(posedge clk) sr <= {sr[62:0], d};
  assign q = (delay_cycles == 0) ? d : sr[delay_cycles-1];
endmodule
