// sync_ff: two-flip-flop resynchronizer for an asynchronous trigger input.
//
// Every trigger line entering an FPGA passes two flip-flops before any logic
// uses it, so that a metastable first stage has a full clock to settle and
// no glitch reaches the trigger logic. The output follows the input two
// clocks later. Resynchronizing each input with flip-flops follows the
// loopback scheme; the two-stage depth is this design's own choice.
module sync_ff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] meta_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta_q <= '0;
      q      <= '0;
    end else begin
      meta_q <= d;
      q      <= meta_q;
    end
  end

endmodule
