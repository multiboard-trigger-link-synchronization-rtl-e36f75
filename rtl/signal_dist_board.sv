// signal_dist_board: master unit of the trigger network.
//
// The master drives one trigger line per backplane board and receives one
// return line from each. What the lines carry depends on `mode`:
//   MODE_TRAIN     the LFSR training stream (same stream on every line),
//   MODE_LOOPBACK  the test edge of that board's loopback_meter,
//   MODE_RUN       Algorithm Enable,
//   MODE_IDLE      0.
// Algorithm Enable is set by a rising edge of the tokamak start signal and
// cleared by a rising edge of the stop signal (both resynchronized).
// In loopback mode all boards are measured in parallel; delay_comp then
// turns the N_BOARDS TrgDelay values into the Delay3 setting of each board,
// so Algorithm Enable takes effect on all boards on the same clock.
//
// Follows the published scheme: a single master distributing Algorithm Enable
// from the tokamak signals, generating the LFSR stream and running the
// loopback measurement. Own choices: a separate line and return line per
// board, the mode encoding, sharing one LFSR among the lines and computing
// the compensation here. The line outputs are a mode multiplexer of
// register outputs (no extra register), which INTERNAL_DELAY accounts for.
module signal_dist_board
  import trig_pkg::*;
#(
  parameter int unsigned N_BOARDS       = 2,
  parameter int unsigned INTERNAL_DELAY = 3,
  parameter int unsigned LB_TIMEOUT     = 1000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  link_mode_e mode,
  input  logic       ext_start_i,              // tokamak start, asynchronous
  input  logic       ext_stop_i,               // tokamak stop, asynchronous
  input  logic       lb_start,                 // pulse: start loopback tests
  input  logic       lb_clear,                 // pulse: release loopback lines
  output logic       line_o      [N_BOARDS],
  input  logic       ret_i       [N_BOARDS],
  output logic       ae_o,                     // Algorithm Enable state
  output logic       lb_done_o   [N_BOARDS],   // loopbackDone per board
  output logic       lb_err_o    [N_BOARDS],
  output logic [15:0] lb_count_o [N_BOARDS],   // DelayReadout per board
  output dly_t       trg_delay_o [N_BOARDS],   // TrgDelay per board
  output dly_t       max_delay_o,
  output dly_t       delay3_o    [N_BOARDS]    // Algorithm Enable compensation
);

  // ---- Algorithm Enable from start/stop ----
  logic start_s, stop_s, start_q, stop_q;

  sync_ff #(.WIDTH(2)) u_sync (.clk, .rst_n, .d({ext_start_i, ext_stop_i}), .q({start_s, stop_s}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= 1'b0;
      stop_q  <= 1'b0;
      ae_o    <= 1'b0;
    end else begin
      start_q <= start_s;
      stop_q  <= stop_s;
      if (stop_s && !stop_q)        ae_o <= 1'b0;
      else if (start_s && !start_q) ae_o <= 1'b1;
    end
  end

  // ---- training stream ----
  logic lfsr_bit;
  logic [LFSR_W-1:0] lfsr_state;

  lfsr_gen u_lfsr (.clk, .rst_n, .en(mode == MODE_TRAIN), .bit_o(lfsr_bit), .state_o(lfsr_state));

  // ---- loopback meters, one per board ----
  logic lb_line [N_BOARDS];

  for (genvar b = 0; b < int'(N_BOARDS); b++) begin : g_lb
    logic busy;
    loopback_meter #(
      .INTERNAL_DELAY(INTERNAL_DELAY), .TIMEOUT(LB_TIMEOUT), .CNT_W(16)
    ) u_meter (
      .clk, .rst_n,
      .start(lb_start && mode == MODE_LOOPBACK),
      .clear(lb_clear),
      .ret_in(ret_i[b]),
      .line_o(lb_line[b]),
      .busy_o(busy),
      .done_o(lb_done_o[b]),
      .err_o(lb_err_o[b]),
      .count_o(lb_count_o[b]),
      .trg_delay_o(trg_delay_o[b])
    );

    always_comb begin
      unique case (mode)
        MODE_TRAIN:    line_o[b] = lfsr_bit;
        MODE_LOOPBACK: line_o[b] = lb_line[b];
        MODE_RUN:      line_o[b] = ae_o;
        default:       line_o[b] = 1'b0;
      endcase
    end
  end

  delay_comp #(.N_BOARDS(N_BOARDS)) u_comp (
    .clk, .rst_n, .trg_delay_i(trg_delay_o), .max_o(max_delay_o), .comp_o(delay3_o)
  );

  logic unused;
  assign unused = ^lfsr_state;

endmodule
