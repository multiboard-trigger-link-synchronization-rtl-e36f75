// idelaye2_model: behavioural model of an FPGA input delay element
// (IDELAYE2 in variable-load mode) together with the input flip-flop's
// sampling window. Not synthesizable; used only by the testbenches.
//
// The clock period is TPU taps long. The sampling point of the line lies
// PHASE + tap taps after the data transition, modulo TPU; the whole-period
// part of that sum adds whole clocks of delay. Within JIT taps of a data
// transition the flip-flop violates setup/hold and the model returns a
// random bit. `ld` loads `tap` (as the CNTVALUEIN/LD pins do). `dout` is
// set at the falling clock edge so that it is stable when the board samples
// it at the rising edge; it is the value the board's input flip-flop sees.
module idelaye2_model #(
  parameter int TPU   = 16,
  parameter int NTAPS = 32
) (
  input  logic       clk,
  input  int         phase,     // line phase, in taps
  input  int         jit,       // half-width of the unsafe zone, in taps
  input  logic       ld,
  input  logic [4:0] tap,
  input  logic       din,
  output logic       dout
);
  logic [7:0] hist = '0;
  int         tap_q = 0;

  always @(posedge clk) begin
    hist <= {hist[6:0], din};
    if (ld) tap_q <= int'(tap);
  end

  always @(negedge clk) begin
    automatic int p   = phase + tap_q;
    automatic int pos = p % TPU;
    if (pos < jit || pos >= TPU - jit) dout <= 1'($urandom);
    else if (p / TPU == 0)              dout <= din;
    else                                dout <= hist[p / TPU - 1];
  end
endmodule
