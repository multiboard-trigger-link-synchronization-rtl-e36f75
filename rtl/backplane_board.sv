// backplane_board: trigger logic of one FPGA backplane board.
//
// The board receives the master's trigger line through its input delay
// element (outside, see `tap_o`/`tap_ld_o`) and uses it in three ways:
//   - MODE_TRAIN: tap_trainer searches the delay tap on the LFSR stream;
//     at the same time the board sends its own LFSR stream on its ExtTrg
//     output, and one more tap_trainer per ExtTrg input searches the tap of
//     that input's delay element (`ext_tap_o`/`ext_tap_ld_o`), so every
//     receiver of the board is tuned before any loopback measurement;
//   - MODE_LOOPBACK: the resynchronized line is registered and sent back on
//     `ret_o`, closing the master's loopback measurement;
//   - MODE_RUN: the resynchronized line is Algorithm Enable.
// The ExtTrg lines carry LocTrg in run mode. In MODE_EXTLB they carry the
// board-to-board loopback test: the board selected by `ext_lb_master` raises
// its ExtTrg output from its loopback meters (one per partner board) and
// times the echo of every partner; each other board echoes the ExtTrg
// input of the measuring board (`ext_lb_sel`) on its own ExtTrg output,
// through two resync flip-flops and the output register. `ext_est_o[p]` is
// then the one-way ExtTrg delay to partner p, (round trip - 6) / 2.
// In run mode the threshold trigger produces LocTrg, which is sent to the
// other boards on `ext_trg_o` and, with the ExtTrg lines of the other boards,
// enters trig_dist (Delay1/Delay2/Delay3 as programmed). The delayed
// Algorithm Enable restarts the timestamp counter; Data registration start
// makes event_recorder store a window of ADC samples with its timestamp.
//
// Latencies (clocks): master line -> Algorithm Enable at trig_dist: wire + 2;
// line -> ret_o: 3 (two resync flip-flops, output register);
// ExtTrg output in MODE_TRAIN: the LFSR generator's register, no extra stage;
// LocTrg -> own trig_dist: 0; LocTrg -> other board's trig_dist: 1 (output
// register) + wire + 2 (resync). Equal registration time on all boards
// therefore needs Delay1 = D + 3 and Delay2 = D - wire, with D the largest
// ExtTrg wire delay, and Delay3 from the master's delay compensation.
//
// The split into training, loopback echo and trigger distribution follows
// the published scheme; the mode control, the latencies and the sharing of one
// line for all three uses are this design's own choices.
module backplane_board
  import trig_pkg::*;
#(
  parameter int unsigned N_BOARDS  = 2,
  parameter int unsigned CHANNELS  = 64,
  parameter int unsigned ADC_BITS  = 12,
  parameter int unsigned WINDOW    = 8,
  parameter int unsigned DEPTH     = 16,
  parameter int unsigned TS_W      = 32,
  parameter int unsigned NTAPS     = 32,
  parameter int unsigned T_CYCLES  = 4096,
  parameter int unsigned SETTLE    = 8,
  parameter int unsigned MAX_DELAY = 64,
  parameter int unsigned INTERNAL_DELAY = 3,
  parameter int unsigned LB_TIMEOUT = 1000,
  localparam int unsigned N_EXT    = (N_BOARDS > 1) ? N_BOARDS - 1 : 1,
  localparam int unsigned TAP_W    = $clog2(NTAPS),
  localparam int unsigned EV_W     = $clog2(DEPTH),
  localparam int unsigned WI_W     = (WINDOW > 1) ? $clog2(WINDOW) : 1,
  localparam int unsigned SEL_W    = (N_EXT > 1) ? $clog2(N_EXT) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  link_mode_e                        mode,
  // trigger line from the master, after the input delay element
  input  logic                              line_i,
  output logic [TAP_W-1:0]                  tap_o,
  output logic                              tap_ld_o,
  input  logic                              train_start,
  output logic                              train_done_o,
  output logic                              link_ok_o,
  output logic [TAP_W-1:0]                  tap_opt_o,
  output logic [NTAPS-1:0]                  pass_map_o,
  output logic                              correct_o,   // correctTransmission
  // training of the ExtTrg inputs (delay elements outside)
  output logic [TAP_W-1:0]                  ext_tap_o       [N_EXT],
  output logic                              ext_tap_ld_o    [N_EXT],
  output logic                              ext_train_done_o,
  output logic                              ext_link_ok_o   [N_EXT],
  // loopback return to the master
  output logic                              ret_o,
  // board-to-board loopback over the ExtTrg lines
  input  logic                              lb_start,
  input  logic                              lb_clear,
  input  logic                              ext_lb_master, // this board measures
  input  logic [SEL_W-1:0]                  ext_lb_sel,    // partner input to echo
  output dly_t                              ext_est_o [N_EXT],
  output logic                              ext_lb_done_o,
  output logic                              ext_lb_err_o,
  // ExtTrg lines
  output logic                              ext_trg_o,
  input  logic                              ext_trg_i [N_EXT],
  // trigger delays
  input  dly_t                              delay1,
  input  dly_t                              delay2    [N_EXT],
  input  dly_t                              delay3,
  // data
  input  logic [CHANNELS-1:0][ADC_BITS-1:0] adc_i,
  input  logic [ADC_BITS-1:0]               threshold,
  output logic                              loc_trg_o,
  output logic                              ae_o,        // delayed Algorithm Enable
  output logic                              reg_start_o, // Data registration start
  output logic [TS_W-1:0]                   ts_o,
  input  logic                              rec_clear,
  output logic [EV_W:0]                     rec_count_o,
  output logic [15:0]                       rec_dropped_o,
  input  logic [EV_W-1:0]                   rd_evt,
  input  logic [WI_W-1:0]                   rd_idx,
  output logic [CHANNELS-1:0][ADC_BITS-1:0] rd_data_o,
  output logic [TS_W-1:0]                   rd_ts_o
);

  // ---- link training ----
  logic train_busy;
  logic [TAP_W-1:0] tap_start, tap_end;

  tap_trainer #(.NTAPS(NTAPS), .T_CYCLES(T_CYCLES), .SETTLE(SETTLE)) u_train (
    .clk, .rst_n,
    .start(train_start && mode == MODE_TRAIN),
    .din(line_i),
    .tap_o, .tap_ld_o,
    .busy_o(train_busy), .done_o(train_done_o), .link_ok_o,
    .tap_start_o(tap_start), .tap_end_o(tap_end), .tap_opt_o,
    .pass_map_o, .correct_o
  );

  // ExtTrg inputs: the same search on each partner's LFSR stream
  logic ext_tr_done [N_EXT];

  for (genvar i = 0; i < int'(N_EXT); i++) begin : g_ext_train
    logic             busy, correct;
    logic [TAP_W-1:0] t_start, t_end, t_opt;
    logic [NTAPS-1:0] map;
    tap_trainer #(.NTAPS(NTAPS), .T_CYCLES(T_CYCLES), .SETTLE(SETTLE)) u_train (
      .clk, .rst_n,
      .start(train_start && mode == MODE_TRAIN),
      .din(ext_trg_i[i]),
      .tap_o(ext_tap_o[i]), .tap_ld_o(ext_tap_ld_o[i]),
      .busy_o(busy), .done_o(ext_tr_done[i]), .link_ok_o(ext_link_ok_o[i]),
      .tap_start_o(t_start), .tap_end_o(t_end), .tap_opt_o(t_opt),
      .pass_map_o(map), .correct_o(correct)
    );
    logic unused_t;
    assign unused_t = busy ^ correct ^ (^t_start) ^ (^t_end) ^ (^t_opt) ^ (^map);
  end

  always_comb begin
    ext_train_done_o = 1'b1;
    for (int i = 0; i < int'(N_EXT); i++) ext_train_done_o = ext_train_done_o & ext_tr_done[i];
  end

  // own LFSR stream for the partners' ExtTrg trainers
  logic             lfsr_bit;
  logic [LFSR_W-1:0] lfsr_state;
  lfsr_gen u_lfsr (
    .clk, .rst_n, .en(mode == MODE_TRAIN), .bit_o(lfsr_bit), .state_o(lfsr_state)
  );

  // ---- resynchronized inputs ----
  logic line_s;
  logic ext_s [N_EXT];

  sync_ff u_sync_line (.clk, .rst_n, .d(line_i), .q(line_s));

  for (genvar i = 0; i < int'(N_EXT); i++) begin : g_ext_sync
    sync_ff u_sync_ext (.clk, .rst_n, .d(ext_trg_i[i]), .q(ext_s[i]));
  end

  // ---- loopback echo and ExtTrg output ----
  logic run, extlb, ext_out_q;
  assign run   = (mode == MODE_RUN);
  assign extlb = (mode == MODE_EXTLB);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ret_o     <= 1'b0;
      ext_out_q <= 1'b0;
    end else begin
      ret_o     <= (mode == MODE_LOOPBACK) && line_s;
      ext_out_q <= (run && loc_trg_o) ||
                   (extlb && !ext_lb_master && ext_s[int'(ext_lb_sel) % int'(N_EXT)]);
    end
  end

  // ---- board-to-board loopback meters, one per partner ----
  logic ext_lb_line [N_EXT];
  logic ext_done [N_EXT], ext_err [N_EXT];

  for (genvar i = 0; i < int'(N_EXT); i++) begin : g_ext_lb
    logic        busy;
    logic [15:0] count;
    loopback_meter #(.INTERNAL_DELAY(INTERNAL_DELAY), .TIMEOUT(LB_TIMEOUT), .CNT_W(16)) u_meter (
      .clk, .rst_n,
      .start(lb_start && extlb && ext_lb_master),
      .clear(lb_clear),
      .ret_in(ext_trg_i[i] && N_BOARDS > 1),
      .line_o(ext_lb_line[i]),
      .busy_o(busy), .done_o(ext_done[i]), .err_o(ext_err[i]),
      .count_o(count), .trg_delay_o(ext_est_o[i])
    );
  end

  always_comb begin
    ext_lb_done_o = 1'b1;
    ext_lb_err_o  = 1'b0;
    for (int i = 0; i < int'(N_EXT); i++) begin
      ext_lb_done_o = ext_lb_done_o & ext_done[i];
      ext_lb_err_o  = ext_lb_err_o | ext_err[i];
    end
  end

  // all meters start together, so their lines are equal
  always_comb begin
    if (mode == MODE_TRAIN)         ext_trg_o = lfsr_bit;
    else if (extlb && ext_lb_master) ext_trg_o = ext_lb_line[0];
    else                            ext_trg_o = ext_out_q;
  end

  // ---- trigger distribution ----
  logic ae_in;
  logic ext_run [N_EXT];
  assign ae_in = run && line_s;
  for (genvar i = 0; i < int'(N_EXT); i++) begin : g_ext_run
    assign ext_run[i] = run && ext_s[i] && (N_BOARDS > 1);
  end

  threshold_trigger #(.CHANNELS(CHANNELS), .ADC_BITS(ADC_BITS)) u_thr (
    .clk, .rst_n, .adc_i, .threshold, .loc_trg_o
  );

  trig_dist #(.N_EXT(N_EXT), .MAX_DELAY(MAX_DELAY)) u_dist (
    .clk, .rst_n,
    .ae_i(ae_in), .ext_trg_i(ext_run), .loc_trg_i(run && loc_trg_o),
    .delay1, .delay2, .delay3,
    .ae_o, .reg_start_o
  );

  timestamp_counter #(.TS_W(TS_W)) u_ts (.clk, .rst_n, .sync_i(ae_o), .ts_o);

  logic rec_busy;
  event_recorder #(
    .CHANNELS(CHANNELS), .ADC_BITS(ADC_BITS), .WINDOW(WINDOW), .DEPTH(DEPTH), .TS_W(TS_W)
  ) u_rec (
    .clk, .rst_n, .clear(rec_clear),
    .reg_start_i(reg_start_o), .ts_i(ts_o), .adc_i,
    .busy_o(rec_busy), .count_o(rec_count_o), .dropped_o(rec_dropped_o),
    .rd_evt, .rd_idx, .rd_data_o, .rd_ts_o
  );

  logic unused;
  assign unused = train_busy ^ rec_busy ^ (^tap_start) ^ (^tap_end) ^ (^lfsr_state);

endmodule
