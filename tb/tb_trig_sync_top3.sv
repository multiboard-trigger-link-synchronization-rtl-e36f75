// tb_trig_sync_top3: the trigger system with three backplane boards, where
// every ExtTrg line has its own delay and each board needs a different
// Delay2 per incoming line. The bitskip period is shortened to 256 clocks.
// Runs training (master line and ExtTrg inputs), master loopback, ExtTrg loopback from every board, and
// then hits on each board in turn and on all at once: all three boards
// must start registration on the same clock with the same timestamp.
// Last, the master line to board 2 is cut (held at 0) and training and
// loopback are repeated: board 2 must report a failed link and a loopback
// timeout while boards 0 and 1 still pass (the line diagnostic).
module tb_trig_sync_top3;
  import trig_pkg::*;
  localparam int N = 3, NE = 2, CH = 64, B = 12, TPU = 16;
  logic clk = 0, rst_n = 0;
  link_mode_e mode = MODE_IDLE;
  logic ext_start_i = 0, ext_stop_i = 0, train_start = 0, lb_start = 0, lb_clear = 0;
  logic [1:0] ext_lb_src = '0;
  logic ext_dly_manual = 0;
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
  logic [3:0] rd_evt = '0;
  logic [2:0] rd_idx = '0;
  logic ae_o;
  logic lb_done_o [N], lb_err_o [N], train_done_o [N], link_ok_o [N], correct_o [N];
  logic ext_lb_done_o [N], ext_lb_err_o [N];
  dly_t ext_est_o [N][NE];
  dly_t delay1_o [N];
  dly_t delay2_o [N][NE];
  logic loc_trg_o [N], b_ae_o [N], reg_start_o [N];
  dly_t trg_delay_o [N], delay3_o [N];
  logic [31:0] ts_o [N], rd_ts_o [N];
  logic [4:0] rec_count_o [N];
  logic [15:0] rec_dropped_o [N];
  logic [CH-1:0][B-1:0] rd_data_o [N];
  int checks = 0, failures = 0;

  trig_sync_top #(.N_BOARDS(3), .T_CYCLES(256)) dut (.*);
  always #5 clk = ~clk;

  // network: cables 2/6/4 clocks, phases chosen so that the delay element
  // adds one whole clock on every board; symmetric ExtTrg delays
  int dm [N] = '{2, 6, 4};
  int ph [N] = '{6, 10, 6};
  int de [N][N] = '{'{0, 3, 7}, '{3, 0, 1}, '{7, 1, 0}};
  logic far_line [N];
  logic cut [N] = '{0, 0, 0};

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

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic [N-1:0] hit = '0;
  always_comb
    for (int b = 0; b < N; b++)
      for (int c = 0; c < CH; c++)
        adc_i[b][c] = (hit[b] && c == 40) ? 12'd3500 : B'((cyc + c * 5 + b * 300) % 2048);

  int rise_cyc [N][$];
  int ae_rise [N];
  logic reg_q [N], ae_q [N];
  initial for (int b = 0; b < N; b++) begin reg_q[b] = 0; ae_q[b] = 0; ae_rise[b] = -1; end
  always @(posedge clk)
    for (int b = 0; b < N; b++) begin
      reg_q[b] <= reg_start_o[b];
      ae_q[b]  <= b_ae_o[b];
      if (rst_n && reg_start_o[b] && !reg_q[b]) rise_cyc[b].push_back(cyc);
      if (rst_n && b_ae_o[b] && !ae_q[b]) ae_rise[b] = cyc;
    end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int n, mx;
    logic [N-1:0] masks [4];
    for (int b = 0; b < N; b++) begin
      delay1[b] = '0;
      for (int p = 0; p < NE; p++) delay2[b][p] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // training
    @(negedge clk) mode = MODE_TRAIN;
    repeat (20) @(negedge clk);
    train_start = 1; @(negedge clk) train_start = 0;
    n = 0;
    while (!(train_done_o[0] && train_done_o[1] && train_done_o[2]) && n < 50000) begin @(negedge clk); n++; end
    for (int b = 0; b < N; b++) begin
      chk(link_ok_o[b], $sformatf("board %0d trained", b));
      chk((ph[b] + int'(tap_opt_o[b])) / TPU == 1, "delay element adds one clock");
      for (int p = 0; p < NE; p++)
        chk(ext_link_ok_o[b][p] && b_ext_tap_o[b][p] == 5'd17, $sformatf("board %0d ExtTrg input %0d trained", b, p));
    end
    // master loopback
    @(negedge clk) mode = MODE_LOOPBACK;
    repeat (40) @(negedge clk);
    lb_start = 1; @(negedge clk) lb_start = 0;
    repeat (100) @(negedge clk);
    mx = 0;
    for (int b = 0; b < N; b++) if (dm[b] > mx) mx = dm[b];
    for (int b = 0; b < N; b++) begin
      chk(lb_done_o[b] && trg_delay_o[b] == dly_t'(dm[b]), $sformatf("TrgDelay %0d", b));
      chk(delay3_o[b] == dly_t'(mx - dm[b]), $sformatf("Delay3 %0d", b));
    end
    lb_clear = 1; @(negedge clk) lb_clear = 0;
    // ExtTrg loopback from every board
    @(negedge clk) mode = MODE_EXTLB;
    for (int src = 0; src < N; src++) begin
      ext_lb_src = 2'(src);
      repeat (40) @(negedge clk);
      lb_start = 1; @(negedge clk) lb_start = 0;
      repeat (60) @(negedge clk);
      chk(ext_lb_done_o[src] && !ext_lb_err_o[src], $sformatf("ExtTrg loopback %0d", src));
      for (int k = 0; k < N; k++) if (k != src)
        chk(ext_est_o[src][(k < src) ? k : k - 1] == dly_t'(de[src][k]), $sformatf("estimate %0d to %0d", src, k));
      lb_clear = 1; @(negedge clk) lb_clear = 0;
    end
    repeat (40) @(negedge clk);
    for (int b = 0; b < N; b++) begin
      chk(delay1_o[b] == dly_t'(7 + 3), "Delay1");
      for (int j = 0; j < N; j++) if (j != b)
        chk(delay2_o[b][(j < b) ? j : j - 1] == dly_t'(7 - de[j][b]), $sformatf("Delay2 board %0d from %0d", b, j));
    end
    // run
    @(negedge clk) mode = MODE_RUN;
    repeat (10) @(negedge clk);
    ext_start_i = 1;
    repeat (60) @(negedge clk);
    chk(ae_rise[0] >= 0 && ae_rise[0] == ae_rise[1] && ae_rise[1] == ae_rise[2], "Algorithm Enable aligned");
    masks[0] = 3'b001; masks[1] = 3'b010; masks[2] = 3'b100; masks[3] = 3'b111;
    for (int e = 0; e < 4; e++) begin
      @(negedge clk) hit = masks[e];
      @(negedge clk) hit = '0;
      repeat (40) @(negedge clk);
    end
    for (int b = 0; b < N; b++) chk(rise_cyc[b].size() == 4, $sformatf("board %0d: 4 starts (%p)", b, rise_cyc[b]));
    for (int e = 0; e < 4; e++) begin
      if (rise_cyc[0].size() > e && rise_cyc[1].size() > e && rise_cyc[2].size() > e)
        chk(rise_cyc[0][e] == rise_cyc[1][e] && rise_cyc[1][e] == rise_cyc[2][e],
            $sformatf("event %0d aligned on three boards", e));
      @(negedge clk) rd_evt = 4'(e); rd_idx = '0;
      @(negedge clk);
      chk(rd_ts_o[0] == rd_ts_o[1] && rd_ts_o[1] == rd_ts_o[2], $sformatf("event %0d same timestamp", e));
    end
    // line diagnostic: cut the master line to board 2
    ext_start_i = 0;
    @(negedge clk) mode = MODE_TRAIN;
    cut[2] = 1;
    repeat (20) @(negedge clk);
    train_start = 1; @(negedge clk) train_start = 0;
    repeat (5) @(negedge clk);
    n = 0;
    while (!(train_done_o[0] && train_done_o[1] && train_done_o[2]) && n < 50000) begin @(negedge clk); n++; end
    chk(link_ok_o[0] && link_ok_o[1], "good lines still train");
    chk(!link_ok_o[2], "cut line reported by training");
    @(negedge clk) mode = MODE_LOOPBACK;
    repeat (40) @(negedge clk);
    lb_start = 1; @(negedge clk) lb_start = 0;
    repeat (1100) @(negedge clk);
    chk(lb_done_o[0] && !lb_err_o[0] && lb_done_o[1] && !lb_err_o[1], "good lines loop back");
    chk(lb_err_o[2] && !lb_done_o[2], "cut line reported by loopback timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
