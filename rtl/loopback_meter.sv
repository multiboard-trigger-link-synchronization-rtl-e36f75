// loopback_meter: round-trip delay measurement of one trained trigger line.
//
// On `start` the meter drives its line output from 0 to 1 (a rising edge)
// and starts counting clocks. The far board resynchronizes the line and
// sends it back on the return line. The return line passes two resync
// flip-flops here; when it reads 1, `done_o` (loopbackDone) is set and the
// count is frozen in `count_o` (DelayReadout). The one-way delay to be
// compensated is then
//     trg_delay_o = (DelayReadout - 2*INTERNAL_DELAY) / 2
// where INTERNAL_DELAY is the logic latency of one FPGA on the path. With
// the register stages of this design (output register here; two resync
// flip-flops and an output register on the far board; two resync flip-flops
// and the done register here) INTERNAL_DELAY is 3, and a loop with zero wire
// delay reads 6. The result saturates at 0 and at the delay-value width.
//
// If no echo arrives within TIMEOUT clocks the meter stops with `err_o`, so a
// broken line is reported instead of hanging. The edge/echo/count scheme and
// the formula follow the routing-delay removal algorithm; the timeout, the
// widths and INTERNAL_DELAY's value are this design's own.
//
// The line stays at 1 after the measurement until `start` is low and
// `clear` is pulsed, so the far board can see a clean single edge.
module loopback_meter
  import trig_pkg::*;
#(
  parameter int unsigned INTERNAL_DELAY = 3,
  parameter int unsigned TIMEOUT        = 1000,
  parameter int unsigned CNT_W          = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,     // pulse: send the test edge
  input  logic             clear,     // return the line to 0
  input  logic             ret_in,    // return line, asynchronous
  output logic             line_o,    // test line towards the far board
  output logic             busy_o,
  output logic             done_o,    // loopbackDone
  output logic             err_o,     // no echo within TIMEOUT
  output logic [CNT_W-1:0] count_o,   // DelayReadout
  output dly_t             trg_delay_o
);

  logic ret_s;

  sync_ff u_sync (.clk, .rst_n, .d(ret_in), .q(ret_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_o  <= 1'b0;
      busy_o  <= 1'b0;
      done_o  <= 1'b0;
      err_o   <= 1'b0;
      count_o <= '0;
    end else begin
      if (start && !busy_o) begin
        line_o  <= 1'b1;
        busy_o  <= 1'b1;
        done_o  <= 1'b0;
        err_o   <= 1'b0;
        count_o <= '0;
      end else if (busy_o) begin
        count_o <= count_o + 1'b1;
        if (ret_s) begin
          done_o <= 1'b1;
          busy_o <= 1'b0;
        end else if (count_o == CNT_W'(TIMEOUT)) begin
          err_o  <= 1'b1;
          busy_o <= 1'b0;
        end
      end else if (clear) begin
        line_o <= 1'b0;
        done_o <= 1'b0;
      end
    end
  end

  // a measurement ends either with loopbackDone or with a timeout, never both,
  // and the test line stays high while the measurement runs
  a_done_xor_err: assert property (@(posedge clk) disable iff (!rst_n) !(done_o && err_o));
  a_line_high:    assert property (@(posedge clk) disable iff (!rst_n) busy_o |-> line_o);

  // TrgDelay = (DelayReadout - 2*InternalDelay)/2
  logic [CNT_W-1:0] net;
  always_comb begin
    net = (count_o > CNT_W'(2 * INTERNAL_DELAY)) ? count_o - CNT_W'(2 * INTERNAL_DELAY) : '0;
    net = net >> 1;
    trg_delay_o = (net > CNT_W'({DLY_W{1'b1}})) ? '1 : dly_t'(net);
  end

endmodule
