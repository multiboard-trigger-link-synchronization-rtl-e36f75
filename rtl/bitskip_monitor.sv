// bitskip_monitor: watches the correctTransmission flag over a test period.
//
// A `start` pulse opens a window of T_CYCLES clocks. During the window the
// monitor records whether the flag was ever 0 (`changed_o`). When the window
// ends, `done_o` pulses for one clock and `pass_o` holds 1 only if the flag
// was 1 on every clock of the window, i.e. it never changed and stayed set.
// `pass_o` and `changed_o` keep their values until the next `start`.
//
// The rule (flag unchanged and 1 for the whole time T means the tap is good)
// follows the training algorithm; the length of T is not given and
// T_CYCLES = 4096 is this design's own default.
module bitskip_monitor #(
  parameter int unsigned T_CYCLES = 4096
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic flag,       // correctTransmission
  output logic busy_o,
  output logic done_o,
  output logic pass_o,
  output logic changed_o
);

  localparam int unsigned CNT_W = $clog2(T_CYCLES + 1);

  logic [CNT_W-1:0] cnt_q;
  logic             bad_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      bad_q     <= 1'b0;
      busy_o    <= 1'b0;
      done_o    <= 1'b0;
      pass_o    <= 1'b0;
      changed_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (start) begin
        cnt_q     <= CNT_W'(T_CYCLES - 1);
        bad_q     <= 1'b0;
        busy_o    <= 1'b1;
        pass_o    <= 1'b0;
        changed_o <= 1'b0;
      end else if (busy_o) begin
        if (!flag) bad_q <= 1'b1;
        if (cnt_q == '0) begin
          busy_o    <= 1'b0;
          done_o    <= 1'b1;
          pass_o    <= !(bad_q || !flag);
          changed_o <= bad_q || !flag;
        end else begin
          cnt_q <= cnt_q - 1'b1;
        end
      end
    end
  end

endmodule
