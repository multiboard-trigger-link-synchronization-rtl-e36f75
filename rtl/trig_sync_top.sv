// trig_sync_top: multiboard trigger synchronization system.
//
// One signal distribution board (the master) and N_BOARDS FPGA backplane
// boards, all on one clock. The physical parts between them are not logic
// and stay outside: the master's line outputs (`m_line_o`) reach each board
// through cables, buffers and level translators and then the board's input
// delay element (IDELAYE2), whose tap the board controls through
// `b_tap_o`/`b_tap_ld_o` and whose output comes back in as `b_line_i`;
// the boards' loopback returns (`b_ret_o`) come back to the master as
// `m_ret_i`; each board's ExtTrg output (`b_ext_o`) reaches the other boards
// through their own input delay elements (taps on `b_ext_tap_o`/
// `b_ext_tap_ld_o`) as `b_ext_i` (board k receives the boards other than k
// in increasing order).
//
// Operation, all selected by `mode`, which the host sets for master and
// boards alike:
//   1. MODE_TRAIN, `train_start`: every board sweeps its input tap on the
//      master's LFSR stream and settles on the middle of the good window;
//      at the same time every board sends its own LFSR stream on ExtTrg and
//      tunes each ExtTrg input the same way (`ext_link_ok_o`).
//   2. MODE_LOOPBACK, `lb_start`: the master measures every line's round
//      trip; delay_comp turns the one-way delays into each board's Delay3,
//      applied here directly.
//   3. MODE_EXTLB, `lb_start` once for each `ext_lb_src` = 0 .. N_BOARDS-1:
//      board ext_lb_src times the ExtTrg round trip to every other board,
//      which echo it; ext_delay_comp turns all results into each board's
//      Delay1 and per-line Delay2. With `ext_dly_manual` = 1 the host's
//      `delay1`/`delay2` are used instead (for lines whose two directions
//      differ, which the round trip cannot tell apart).
//   4. MODE_RUN: Algorithm Enable (tokamak start/stop) and the boards' local
//      triggers start raw-data registration on all boards on the same clock,
//      with the same timestamp.
module trig_sync_top
  import trig_pkg::*;
#(
  parameter int unsigned N_BOARDS       = 2,
  parameter int unsigned CHANNELS       = 64,
  parameter int unsigned ADC_BITS       = 12,
  parameter int unsigned WINDOW         = 8,
  parameter int unsigned DEPTH          = 16,
  parameter int unsigned TS_W           = 32,
  parameter int unsigned NTAPS          = 32,
  parameter int unsigned T_CYCLES       = 4096,
  parameter int unsigned SETTLE         = 8,
  parameter int unsigned MAX_DELAY      = 64,
  parameter int unsigned INTERNAL_DELAY = 3,
  parameter int unsigned LB_TIMEOUT     = 1000,
  localparam int unsigned N_EXT         = (N_BOARDS > 1) ? N_BOARDS - 1 : 1,
  localparam int unsigned TAP_W         = $clog2(NTAPS),
  localparam int unsigned EV_W          = $clog2(DEPTH),
  localparam int unsigned WI_W          = (WINDOW > 1) ? $clog2(WINDOW) : 1,
  localparam int unsigned SEL_W         = (N_EXT > 1) ? $clog2(N_EXT) : 1,
  localparam int unsigned SRC_W         = (N_BOARDS > 1) ? $clog2(N_BOARDS) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  link_mode_e                        mode,
  input  logic                              ext_start_i,
  input  logic                              ext_stop_i,
  input  logic                              train_start,
  input  logic                              lb_start,
  input  logic                              lb_clear,
  input  logic [SRC_W-1:0]                  ext_lb_src,     // measuring board in MODE_EXTLB
  input  logic                              ext_dly_manual, // use host delay1/delay2
  // master side of the trigger lines
  output logic                              m_line_o    [N_BOARDS],
  input  logic                              m_ret_i     [N_BOARDS],
  // board side of the trigger lines
  input  logic                              b_line_i    [N_BOARDS],
  output logic [TAP_W-1:0]                  b_tap_o     [N_BOARDS],
  output logic                              b_tap_ld_o  [N_BOARDS],
  output logic                              b_ret_o     [N_BOARDS],
  output logic                              b_ext_o     [N_BOARDS],
  input  logic                              b_ext_i     [N_BOARDS][N_EXT],
  output logic [TAP_W-1:0]                  b_ext_tap_o    [N_BOARDS][N_EXT],
  output logic                              b_ext_tap_ld_o [N_BOARDS][N_EXT],
  // host-set ExtTrg delays (used when ext_dly_manual = 1)
  input  dly_t                              delay1      [N_BOARDS],
  input  dly_t                              delay2      [N_BOARDS][N_EXT],
  // data
  input  logic [CHANNELS-1:0][ADC_BITS-1:0] adc_i       [N_BOARDS],
  input  logic [ADC_BITS-1:0]               threshold,
  input  logic                              rec_clear,
  input  logic [EV_W-1:0]                   rd_evt,
  input  logic [WI_W-1:0]                   rd_idx,
  // status
  output logic                              ae_o,
  output logic                              lb_done_o   [N_BOARDS],
  output logic                              lb_err_o    [N_BOARDS],
  output dly_t                              trg_delay_o [N_BOARDS],
  output dly_t                              delay3_o    [N_BOARDS],
  output logic                              ext_lb_done_o [N_BOARDS],
  output logic                              ext_lb_err_o  [N_BOARDS],
  output dly_t                              ext_est_o   [N_BOARDS][N_EXT],
  output dly_t                              delay1_o    [N_BOARDS],   // Delay1 in use
  output dly_t                              delay2_o    [N_BOARDS][N_EXT],
  output logic                              train_done_o[N_BOARDS],
  output logic                              link_ok_o   [N_BOARDS],
  output logic                              ext_train_done_o [N_BOARDS],
  output logic                              ext_link_ok_o    [N_BOARDS][N_EXT],
  output logic [TAP_W-1:0]                  tap_opt_o   [N_BOARDS],
  output logic                              correct_o   [N_BOARDS],
  output logic                              loc_trg_o   [N_BOARDS],
  output logic                              b_ae_o      [N_BOARDS],
  output logic                              reg_start_o [N_BOARDS],
  output logic [TS_W-1:0]                   ts_o        [N_BOARDS],
  output logic [EV_W:0]                     rec_count_o [N_BOARDS],
  output logic [15:0]                       rec_dropped_o [N_BOARDS],
  output logic [CHANNELS-1:0][ADC_BITS-1:0] rd_data_o   [N_BOARDS],
  output logic [TS_W-1:0]                   rd_ts_o     [N_BOARDS]
);

  logic [15:0] lb_count [N_BOARDS];
  dly_t        max_delay;

  signal_dist_board #(
    .N_BOARDS(N_BOARDS), .INTERNAL_DELAY(INTERNAL_DELAY), .LB_TIMEOUT(LB_TIMEOUT)
  ) u_master (
    .clk, .rst_n, .mode,
    .ext_start_i, .ext_stop_i, .lb_start, .lb_clear,
    .line_o(m_line_o), .ret_i(m_ret_i),
    .ae_o, .lb_done_o, .lb_err_o, .lb_count_o(lb_count),
    .trg_delay_o, .max_delay_o(max_delay), .delay3_o
  );

  // ---- ExtTrg compensation ----
  dly_t ext_max;
  dly_t auto_d1 [N_BOARDS];
  dly_t auto_d2 [N_BOARDS][N_EXT];

  ext_delay_comp #(.N_BOARDS(N_BOARDS), .EXT_EXTRA(3)) u_ext_comp (  // ExtTrg out register + 2 resync
    .clk, .rst_n, .est_i(ext_est_o), .max_o(ext_max), .delay1_o(auto_d1), .delay2_o(auto_d2)
  );

  always_comb begin
    for (int b = 0; b < int'(N_BOARDS); b++) begin
      delay1_o[b] = ext_dly_manual ? delay1[b] : auto_d1[b];
      for (int p = 0; p < int'(N_EXT); p++)
        delay2_o[b][p] = ext_dly_manual ? delay2[b][p] : auto_d2[b][p];
    end
  end

  for (genvar b = 0; b < int'(N_BOARDS); b++) begin : g_board
    logic [NTAPS-1:0] pass_map;
    logic             is_src;
    logic [SEL_W-1:0] src_pos;   // position of the measuring board among b's partners
    assign is_src  = (int'(ext_lb_src) == b);
    assign src_pos = SEL_W'((int'(ext_lb_src) < b) ? int'(ext_lb_src) : int'(ext_lb_src) - 1);
    backplane_board #(
      .N_BOARDS(N_BOARDS), .CHANNELS(CHANNELS), .ADC_BITS(ADC_BITS), .WINDOW(WINDOW),
      .DEPTH(DEPTH), .TS_W(TS_W), .NTAPS(NTAPS), .T_CYCLES(T_CYCLES), .SETTLE(SETTLE),
      .MAX_DELAY(MAX_DELAY), .INTERNAL_DELAY(INTERNAL_DELAY), .LB_TIMEOUT(LB_TIMEOUT)
    ) u_board (
      .clk, .rst_n, .mode,
      .line_i(b_line_i[b]), .tap_o(b_tap_o[b]), .tap_ld_o(b_tap_ld_o[b]),
      .train_start, .train_done_o(train_done_o[b]), .link_ok_o(link_ok_o[b]),
      .tap_opt_o(tap_opt_o[b]), .pass_map_o(pass_map), .correct_o(correct_o[b]),
      .ext_tap_o(b_ext_tap_o[b]), .ext_tap_ld_o(b_ext_tap_ld_o[b]),
      .ext_train_done_o(ext_train_done_o[b]), .ext_link_ok_o(ext_link_ok_o[b]),
      .ret_o(b_ret_o[b]),
      .lb_start, .lb_clear, .ext_lb_master(is_src), .ext_lb_sel(src_pos),
      .ext_est_o(ext_est_o[b]), .ext_lb_done_o(ext_lb_done_o[b]), .ext_lb_err_o(ext_lb_err_o[b]),
      .ext_trg_o(b_ext_o[b]), .ext_trg_i(b_ext_i[b]),
      .delay1(delay1_o[b]), .delay2(delay2_o[b]), .delay3(delay3_o[b]),
      .adc_i(adc_i[b]), .threshold,
      .loc_trg_o(loc_trg_o[b]), .ae_o(b_ae_o[b]), .reg_start_o(reg_start_o[b]), .ts_o(ts_o[b]),
      .rec_clear, .rec_count_o(rec_count_o[b]), .rec_dropped_o(rec_dropped_o[b]),
      .rd_evt, .rd_idx, .rd_data_o(rd_data_o[b]), .rd_ts_o(rd_ts_o[b])
    );
  end

  logic unused;
  always_comb begin
    unused = ^max_delay ^ (^ext_max);
    for (int b = 0; b < int'(N_BOARDS); b++) unused = unused ^ (^lb_count[b]);
  end

endmodule
