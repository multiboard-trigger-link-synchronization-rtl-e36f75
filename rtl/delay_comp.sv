// delay_comp: equalizes the trigger delay of all boards.
//
// Each board's line has its own one-way delay TrgDelay (from the loopback
// test). To make a trigger take effect at the same moment on every board,
// the boards must all wait until the slowest line has delivered it: the
// block finds the maximum of the N_BOARDS TrgDelay values and gives every
// board the extra delay max - TrgDelay[i]. The board with the longest line
// gets 0.
//
// Timing: the outputs are registered and follow the inputs one clock later
// (a linear max search; N_BOARDS is small). Detection of the maximum and its
// use for compensation follow the multi-board case of the delay removal
// algorithm; computing it in logic rather than on the host is an own choice.
module delay_comp
  import trig_pkg::*;
#(
  parameter int unsigned N_BOARDS = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  dly_t trg_delay_i [N_BOARDS],
  output dly_t max_o,
  output dly_t comp_o      [N_BOARDS]
);

  dly_t max_c;

  always_comb begin
    max_c = '0;
    for (int i = 0; i < int'(N_BOARDS); i++) begin
      if (trg_delay_i[i] > max_c) max_c = trg_delay_i[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_o <= '0;
      for (int i = 0; i < int'(N_BOARDS); i++) comp_o[i] <= '0;
    end else begin
      max_o <= max_c;
      for (int i = 0; i < int'(N_BOARDS); i++) comp_o[i] <= max_c - trg_delay_i[i];
    end
  end

endmodule
