// tb_trig_sync_top: end-to-end test of the trigger system at its default
// size (two backplane boards, 64 channels, 32 taps, 4096-clock bitskip
// period). The physical network is modelled: each master line and its
// return have a cable delay, each board input has its own delay-element
// phase, each ExtTrg line has its own delay between every pair of boards.
//
// Sequence: (1) link training on every board: the loaded tap must be the
// middle of the widest good window the model gives, on the master line and
// on every ExtTrg input; (2) loopback test:
// TrgDelay and Delay3 per board; (3) ExtTrg loopback from each board in
// turn: one-way estimates and the Delay1/Delay2 derived from them; (4) run,
// first with those derived delays, then with host-set delays on lines
// whose two directions differ: Algorithm Enable must reach both
// boards' trigger logic on the same clock; ADC hits on one board, the other
// or both must start registration on both boards on the same clock, with
// the same timestamp, and the stored windows must hold the ADC samples of
// the start clock onwards; a hit after the stop signal must not register;
// more events than the memory holds must be counted as dropped; (5) line
// diagnostic: the master line to board 1 is cut (held at 0), training must
// report no good tap and loopback a timeout on that board only.
// Each mechanism is counted and a mechanism that never occurs is a failure.
module tb_trig_sync_top;
  import trig_pkg::*;
  localparam int N = 2, NE = 1, CH = 64, B = 12, DEPTH = 16, WINDOW = 8, TPU = 16;
  logic clk = 0, rst_n = 0;
  link_mode_e mode = MODE_IDLE;
  logic ext_start_i = 0, ext_stop_i = 0, train_start = 0, lb_start = 0, lb_clear = 0;
  logic m_line_o [N], m_ret_i [N], b_line_i [N], b_tap_ld_o [N], b_ret_o [N], b_ext_o [N];
  logic [4:0] b_tap_o [N], tap_opt_o [N];
  logic b_ext_i [N][NE];
  logic [4:0] b_ext_tap_o [N][NE];
  logic b_ext_tap_ld_o [N][NE], ext_train_done_o [N], ext_link_ok_o [N][NE];
  dly_t delay1 [N];
  dly_t delay2 [N][NE];
  logic [CH-1:0][B-1:0] adc_i [N];
  logic [B-1:0] threshold = 12'd3000;
  logic rec_clear = 0;
  logic ext_lb_src = 0, ext_dly_manual = 0;
  logic ext_lb_done_o [N], ext_lb_err_o [N];
  dly_t ext_est_o [N][NE];
  dly_t delay1_o [N];
  dly_t delay2_o [N][NE];
  logic [3:0] rd_evt = '0;
  logic [2:0] rd_idx = '0;
  logic ae_o;
  logic lb_done_o [N], lb_err_o [N], train_done_o [N], link_ok_o [N], correct_o [N];
  logic loc_trg_o [N], b_ae_o [N], reg_start_o [N];
  dly_t trg_delay_o [N], delay3_o [N];
  logic [31:0] ts_o [N], rd_ts_o [N];
  logic [4:0] rec_count_o [N];
  logic [15:0] rec_dropped_o [N];
  logic [CH-1:0][B-1:0] rd_data_o [N];
  int checks = 0, failures = 0;

  trig_sync_top dut (.*);
  always #5 clk = ~clk;

  // ---------------- physical network ----------------
  int dm [N] = '{3, 7};                 // master <-> board cable, clocks
  int ph [N] = '{6, 10};                // delay-element phase, taps
  int de [N][N] = '{'{0, 4}, '{4, 0}};  // ExtTrg j -> k, clocks
  logic far_line [N];

  for (genvar b = 0; b < N; b++) begin : g_net
    pcb_delay_line u_dn (.clk, .delay_cycles(dm[b]), .d(m_line_o[b] && !cut[b]), .q(far_line[b]));
    idelaye2_model #(.TPU(TPU), .NTAPS(32)) u_idly (
      .clk, .phase(ph[b]), .jit(2), .ld(b_tap_ld_o[b]), .tap(b_tap_o[b]),
      .din(far_line[b]), .dout(b_line_i[b])
    );
    pcb_delay_line u_up (.clk, .delay_cycles(dm[b]), .d(b_ret_o[b]), .q(m_ret_i[b]));
    for (genvar j = 0; j < N; j++) begin : g_ext
      if (j != b) begin : g_line
        // cable de - 1, then the ExtTrg delay element (phase 6), which adds
        // one whole clock once trained (tap 17), so the line totals de
        logic far;
        pcb_delay_line u_ext (.clk, .delay_cycles(de[j][b] - 1), .d(b_ext_o[j]), .q(far));
        idelaye2_model #(.TPU(TPU), .NTAPS(32)) u_edly (
          .clk, .phase(6), .jit(2), .ld(b_ext_tap_ld_o[b][(j < b) ? j : j - 1]),
          .tap(b_ext_tap_o[b][(j < b) ? j : j - 1]), .din(far),
          .dout(b_ext_i[b][(j < b) ? j : j - 1])
        );
      end
    end
  end

  logic cut [N] = '{0, 0};

  // per-tap verdicts of each board's trainer
  logic [31:0] pass_map [N];
  assign pass_map[0] = dut.g_board[0].pass_map;
  assign pass_map[1] = dut.g_board[1].pass_map;

  // ---------------- ADC stimulus ----------------
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic [N-1:0] hit = '0;
  function automatic logic [B-1:0] base(input int b, input int c, input int t);
    return B'((t * 3 + c * 7 + b * 500) % 2048);
  endfunction
  always_comb begin
    for (int b = 0; b < N; b++)
      for (int c = 0; c < CH; c++)
        adc_i[b][c] = (hit[b] && c == 17) ? 12'd4000 : base(b, c, cyc);
  end

  // ---------------- watchers ----------------
  int rise_cyc [N][$];
  int ae_rise [N];
  logic reg_q [N], ae_q [N];
  int n_local = 0, n_remote = 0, n_ts_restart = 0;
  initial for (int b = 0; b < N; b++) begin reg_q[b] = 0; ae_q[b] = 0; ae_rise[b] = -1; end
  always @(posedge clk) begin
    for (int b = 0; b < N; b++) begin
      reg_q[b] <= reg_start_o[b];
      ae_q[b]  <= b_ae_o[b];
      if (rst_n && reg_start_o[b] && !reg_q[b]) rise_cyc[b].push_back(cyc);
      if (rst_n && b_ae_o[b] && !ae_q[b]) begin ae_rise[b] = cyc; n_ts_restart++; end
    end
  end

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one ADC hit on the boards in `mask`
  task automatic event_on(input logic [N-1:0] mask);
    @(negedge clk) hit = mask;
    @(negedge clk) hit = '0;
    repeat (40) @(negedge clk);
  endtask

  int n_extlb = 0, n_manual = 0;
  int n_taps_rejected = 0, n_trained = 0, n_lb = 0, n_comp = 0, n_gated = 0, n_drop = 0, n_events = 0, n_diag = 0, n_ext_trained = 0;

  initial begin
    int n, mx_de, mx_trg, k;
    logic [N-1:0] masks [6];
    for (int b = 0; b < N; b++) begin delay1[b] = '0; delay2[b][0] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------- 1. link training ----------
    @(negedge clk) mode = MODE_TRAIN;
    repeat (20) @(negedge clk);
    train_start = 1; @(negedge clk) train_start = 0;
    n = 0;
    while (!(train_done_o[0] && train_done_o[1]) && n < 300000) begin @(negedge clk); n++; end
    $display("training took %0d clocks", n);
    // ExtTrg inputs, phase 6: windows 0..7, 12..23, 28..31; widest 12..23
    for (int b = 0; b < N; b++) begin
      chk(ext_train_done_o[b] && ext_link_ok_o[b][0], $sformatf("board %0d ExtTrg input trained", b));
      chk(b_ext_tap_o[b][0] == 5'd17, $sformatf("board %0d ExtTrg tap %0d", b, b_ext_tap_o[b][0]));
      if (ext_link_ok_o[b][0]) n_ext_trained++;
    end
    for (int b = 0; b < N; b++) begin
      int bs, be, bl, ws;
      logic [31:0] good;
      bl = 0; bs = 0; be = 0; ws = 0;
      for (int t = 0; t < 32; t++) begin
        int pos; pos = (ph[b] + t) % TPU;
        good[t] = pos >= 2 && pos < TPU - 2;
      end
      for (int t = 0; t < 32; t++) if (good[t]) begin
        if (t == 0 || !good[t-1]) ws = t;
        if (t - ws + 1 > bl) begin bl = t - ws + 1; bs = ws; be = t; end
      end
      chk(train_done_o[b] && link_ok_o[b], $sformatf("board %0d trained", b));
      chk(tap_opt_o[b] == 5'(bs + (be - bs) / 2), $sformatf("board %0d tapOptimal %0d", b, tap_opt_o[b]));
      chk(pass_map[b] == good, $sformatf("board %0d pass map", b));
      for (int t = 0; t < 32; t++) if (!pass_map[b][t]) n_taps_rejected++;
      if (link_ok_o[b]) n_trained++;
    end

    // ---------- 2. loopback ----------
    @(negedge clk) mode = MODE_LOOPBACK;
    repeat (40) @(negedge clk);
    lb_start = 1; @(negedge clk) lb_start = 0;
    repeat (100) @(negedge clk);
    mx_trg = 0;
    for (int b = 0; b < N; b++) begin
      // round trip 6 + 2*cable + one whole clock of the delay element
      k = (ph[b] + int'(tap_opt_o[b])) / TPU;
      chk(lb_done_o[b] && !lb_err_o[b], $sformatf("loopbackDone %0d", b));
      chk(trg_delay_o[b] == dly_t'((2 * dm[b] + k) / 2), $sformatf("TrgDelay %0d = %0d", b, trg_delay_o[b]));
      if (lb_done_o[b]) n_lb++;
      if ((2 * dm[b] + k) / 2 > mx_trg) mx_trg = (2 * dm[b] + k) / 2;
    end
    for (int b = 0; b < N; b++) begin
      chk(delay3_o[b] == dly_t'(mx_trg - int'(trg_delay_o[b])), $sformatf("Delay3 %0d", b));
      if (delay3_o[b] != 0) n_comp++;
    end
    lb_clear = 1; @(negedge clk) lb_clear = 0;
    repeat (40) @(negedge clk);

    // ---------- 3. ExtTrg loopback, each board measuring in turn ----------
    @(negedge clk) mode = MODE_EXTLB;
    for (int src = 0; src < N; src++) begin
      ext_lb_src = 1'(src);
      repeat (40) @(negedge clk);
      lb_start = 1; @(negedge clk) lb_start = 0;
      repeat (60) @(negedge clk);
      chk(ext_lb_done_o[src] && !ext_lb_err_o[src], $sformatf("ExtTrg loopback from %0d", src));
      if (ext_lb_done_o[src]) n_extlb++;
      for (int k = 0; k < N; k++) if (k != src)
        chk(ext_est_o[src][(k < src) ? k : k - 1] == dly_t'((de[src][k] + de[k][src]) / 2),
            $sformatf("ExtTrg estimate %0d to %0d", src, k));
      lb_clear = 1; @(negedge clk) lb_clear = 0;
    end
    repeat (40) @(negedge clk);
    mx_de = 0;
    for (int j = 0; j < N; j++) for (int b = 0; b < N; b++) if (j != b && de[j][b] > mx_de) mx_de = de[j][b];
    for (int b = 0; b < N; b++) begin
      chk(delay1_o[b] == dly_t'(mx_de + 3), $sformatf("derived Delay1 board %0d = %0d", b, delay1_o[b]));
      for (int j = 0; j < N; j++) if (j != b)
        chk(delay2_o[b][(j < b) ? j : j - 1] == dly_t'(mx_de - de[j][b]), "derived Delay2");
    end

    // ---------- 4. run ----------
    @(negedge clk) mode = MODE_RUN;
    repeat (10) @(negedge clk);
    ext_start_i = 1;
    repeat (60) @(negedge clk);
    ext_start_i = 0;
    chk(ae_rise[0] >= 0 && ae_rise[0] == ae_rise[1],
        $sformatf("Algorithm Enable aligned: %0d %0d", ae_rise[0], ae_rise[1]));
    chk(ts_o[0] == ts_o[1], "timestamps equal");

    masks[0] = 2'b01; masks[1] = 2'b10; masks[2] = 2'b11;
    masks[3] = 2'b01; masks[4] = 2'b10; masks[5] = 2'b01;
    for (int e = 0; e < 6; e++) event_on(masks[e]);
    for (int b = 0; b < N; b++) chk(rise_cyc[b].size() == 6, $sformatf("board %0d: 6 starts, %0d", b, rise_cyc[b].size()));
    for (int e = 0; e < 6 && e < rise_cyc[0].size() && e < rise_cyc[1].size(); e++) begin
      chk(rise_cyc[0][e] == rise_cyc[1][e], $sformatf("event %0d start aligned %0d %0d", e, rise_cyc[0][e], rise_cyc[1][e]));
      n_events++;
      for (int b = 0; b < N; b++) begin
        if (masks[e][b]) n_local++;
        else n_remote++;
      end
    end
    // read back the stored windows
    for (int e = 0; e < 6; e++) begin
      for (int i = 0; i < WINDOW; i++) begin
        @(negedge clk); rd_evt = 4'(e); rd_idx = 3'(i);
        @(negedge clk);
        chk(rd_ts_o[0] == rd_ts_o[1], $sformatf("event %0d same timestamp", e));
        for (int b = 0; b < N; b++) begin
          int c0;
          c0 = rise_cyc[b][e];
          chk(rd_ts_o[b] == 32'(c0 - ae_rise[b] - 1), $sformatf("event %0d board %0d timestamp %0d exp %0d", e, b, rd_ts_o[b], c0 - ae_rise[b] - 1));
          for (int c = 0; c < CH; c += 9)
            chk(rd_data_o[b][c] == base(b, c, c0 + i), $sformatf("event %0d board %0d sample %0d ch %0d", e, b, i, c));
        end
      end
    end
    // host-set delays for lines whose directions differ: Delay1 = D + 3,
    // Delay2 = D - wire, with D the largest ExtTrg wire delay
    de[0][1] = 5; de[1][0] = 2;
    mx_de = 5;
    for (int b = 0; b < N; b++) begin
      delay1[b] = dly_t'(mx_de + 3);
      for (int j = 0; j < N; j++) if (j != b) delay2[b][(j < b) ? j : j - 1] = dly_t'(mx_de - de[j][b]);
    end
    ext_dly_manual = 1;
    repeat (20) @(negedge clk);
    event_on(2'b01);
    event_on(2'b10);
    for (int e = 6; e < 8; e++) begin
      chk(rise_cyc[0].size() > e && rise_cyc[1].size() > e && rise_cyc[0][e] == rise_cyc[1][e],
          $sformatf("host-set delays: event %0d aligned", e));
      if (rise_cyc[0].size() > e && rise_cyc[1].size() > e && rise_cyc[0][e] == rise_cyc[1][e]) n_manual++;
    end
    // fill the memory: 10 more events, the last ones dropped
    for (int e = 0; e < 10; e++) event_on(2'b10);
    for (int b = 0; b < N; b++) begin
      chk(rec_count_o[b] == 5'(DEPTH), "memory full");
      chk(rec_dropped_o[b] == 16'(8 + 10 - DEPTH), $sformatf("dropped %0d", rec_dropped_o[b]));
      n_drop += int'(rec_dropped_o[b]);
    end
    rec_clear = 1; @(negedge clk) rec_clear = 0;
    // stop: Algorithm Enable off, hits no longer register
    ext_stop_i = 1;
    repeat (60) @(negedge clk);
    n = rise_cyc[0].size();
    event_on(2'b11);
    chk(rise_cyc[0].size() == n && rec_count_o[0] == 0 && rec_count_o[1] == 0, "no registration after stop");
    if (rise_cyc[0].size() == n) n_gated++;

    // ---------- 5. line diagnostic: cut the master line to board 1 ----------
    ext_stop_i = 0; ext_start_i = 0;
    @(negedge clk) mode = MODE_TRAIN;
    cut[1] = 1;
    repeat (20) @(negedge clk);
    train_start = 1; @(negedge clk) train_start = 0;
    repeat (5) @(negedge clk);
    n = 0;
    while (!(train_done_o[0] && train_done_o[1]) && n < 300000) begin @(negedge clk); n++; end
    chk(link_ok_o[0] && pass_map[0] != 0, "good line still trains");
    chk(!link_ok_o[1] && pass_map[1] == 0, "cut line: no good tap");
    @(negedge clk) mode = MODE_LOOPBACK;
    repeat (40) @(negedge clk);
    lb_start = 1; @(negedge clk) lb_start = 0;
    repeat (1100) @(negedge clk);
    chk(lb_done_o[0] && !lb_err_o[0], "good line loops back");
    chk(lb_err_o[1] && !lb_done_o[1], "cut line: loopback timeout");
    if (!link_ok_o[1] && lb_err_o[1]) n_diag++;
    chk(n_diag > 0, "line fault reported");

    $display("mechanisms: trained=%0d taps_rejected=%0d loopback=%0d compensated=%0d ts_restart=%0d",
             n_trained, n_taps_rejected, n_lb, n_comp, n_ts_restart);
    $display("            extTrg_trained=%0d extTrg_loopback=%0d host_delays_aligned=%0d",
             n_ext_trained, n_extlb, n_manual);
    chk(n_extlb > 0, "ExtTrg loopback happened");
    chk(n_manual > 0, "host-set delay mode used");
    $display("            local_starts=%0d extTrg_starts=%0d aligned_events=%0d dropped=%0d gated=%0d line_faults=%0d",
             n_local, n_remote, n_events, n_drop, n_gated, n_diag);
    chk(n_trained > 0, "training happened");
    chk(n_ext_trained > 0, "ExtTrg input training happened");
    chk(n_taps_rejected > 0, "bit skipping detected on some taps");
    chk(n_lb > 0, "loopback happened");
    chk(n_comp > 0, "nonzero compensation used");
    chk(n_ts_restart > 0, "timestamp restart happened");
    chk(n_local > 0 && n_remote > 0, "local and ExtTrg starts happened");
    chk(n_drop > 0, "overflow happened");
    chk(n_gated > 0, "AE gating happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
