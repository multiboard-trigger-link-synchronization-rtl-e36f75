// event_recorder: raw data registration of trigger windows.
//
// When Data registration start rises (and the recorder is idle and has
// room) it stores the timestamp of that clock and then WINDOW consecutive
// clocks of all CHANNELS ADC samples, beginning with the samples of that
// clock, in an on-chip memory of DEPTH events. Starts that arrive while
// the memory is full are counted in `dropped_o`; starts during a window
// are part of the same event. A simple read port returns one sample vector
// and the event's timestamp one clock after the address; `clear` empties
// the memory.
//
// Registration of a window of several samples with a timestamp, stored in
// memory, follows the published scheme; WINDOW = 8, DEPTH = 16, the memory
// layout and the read port are this design's own choices.
module event_recorder #(
  parameter int unsigned CHANNELS = 64,
  parameter int unsigned ADC_BITS = 12,
  parameter int unsigned WINDOW   = 8,
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned TS_W     = 32,
  localparam int unsigned EV_W    = $clog2(DEPTH),
  localparam int unsigned WI_W    = (WINDOW > 1) ? $clog2(WINDOW) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              clear,
  input  logic                              reg_start_i,
  input  logic [TS_W-1:0]                   ts_i,
  input  logic [CHANNELS-1:0][ADC_BITS-1:0] adc_i,
  output logic                              busy_o,
  output logic [EV_W:0]                     count_o,    // stored events
  output logic [15:0]                       dropped_o,  // starts lost: memory full
  input  logic [EV_W-1:0]                   rd_evt,
  input  logic [WI_W-1:0]                   rd_idx,
  output logic [CHANNELS-1:0][ADC_BITS-1:0] rd_data_o,
  output logic [TS_W-1:0]                   rd_ts_o
);

  logic [CHANNELS-1:0][ADC_BITS-1:0] smp_mem [DEPTH*WINDOW];
  logic [TS_W-1:0]                   ts_mem  [DEPTH];

  logic            start_q;
  logic [WI_W-1:0] idx_q;
  logic            rise;
  logic            full;

  assign rise = reg_start_i && !start_q;
  assign full = (count_o == (EV_W+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q   <= 1'b0;
      busy_o    <= 1'b0;
      idx_q     <= '0;
      count_o   <= '0;
      dropped_o <= '0;
    end else begin
      start_q <= reg_start_i;
      if (clear) begin
        busy_o    <= 1'b0;
        idx_q     <= '0;
        count_o   <= '0;
        dropped_o <= '0;
      end else if (busy_o) begin
        if (idx_q == WI_W'(WINDOW - 1)) begin
          busy_o  <= 1'b0;
          count_o <= count_o + 1'b1;
        end
        idx_q <= idx_q + 1'b1;
      end else if (rise) begin
        if (full) begin
          dropped_o <= dropped_o + 1'b1;
        end else if (WINDOW == 1) begin
          count_o <= count_o + 1'b1;
        end else begin
          busy_o <= 1'b1;
          idx_q  <= WI_W'(1);
        end
      end
    end
  end

  // the event count never exceeds the memory
  a_count: assert property (@(posedge clk) disable iff (!rst_n) count_o <= (EV_W+1)'(DEPTH));

  // memory writes: sample 0 on the start clock, the rest while busy
  logic            wr_en;
  logic [WI_W-1:0] wr_idx;
  assign wr_en  = !clear && (busy_o || (rise && !full));
  assign wr_idx = busy_o ? idx_q : '0;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      smp_mem[int'(count_o[EV_W-1:0]) * int'(WINDOW) + int'(wr_idx)] <= adc_i;
      if (!busy_o) ts_mem[count_o[EV_W-1:0]] <= ts_i;
    end
  end

  always_ff @(posedge clk) begin
    rd_data_o <= smp_mem[int'(rd_evt) * int'(WINDOW) + int'(rd_idx)];
    rd_ts_o   <= ts_mem[rd_evt];
  end

endmodule
