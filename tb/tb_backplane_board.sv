// tb_backplane_board: one board (of a two-board system) behind the input
// delay model. Checks in turn: the tap sweep on an LFSR stream ends on the
// expected optimal tap; at the same time the board's own ExtTrg output,
// looped back through a second delay model (phase 10), must train the
// ExtTrg input to its expected tap; in loopback mode the line comes back on ret_o three
// clocks after the board samples it; in run mode Algorithm Enable reaches
// trig_dist after 2 + Delay3 clocks and restarts the timestamp, a local ADC
// hit produces LocTrg, ExtTrg out and a registration Delay1 clocks later,
// an incoming ExtTrg registers after 2 + Delay2 clocks, and the recorder
// stores each window with the timestamp of its start clock. In ExtTrg
// loopback mode the board, as measuring board, must time the round trip to
// a modelled partner (cable 5 clocks each way, three-register echo) as
// 6 + 10 clocks and report 5; as echoing board it must return the partner's
// edge on its ExtTrg output two clocks after sampling it.
module tb_backplane_board;
  import trig_pkg::*;
  localparam int CH = 4, B = 12, W = 4, DP = 4, T = 64, TPU = 16;
  logic clk = 0, rst_n = 0;
  link_mode_e mode = MODE_IDLE;
  logic line_i, tap_ld_o, train_start = 0, train_done_o, link_ok_o, correct_o;
  logic [4:0] tap_o, tap_opt_o;
  logic [31:0] pass_map_o;
  logic ret_o, ext_trg_o;
  logic ext_trg_i [1];
  logic ext_drive = 0, ext_from_model, use_model = 0;
  logic lb_start = 0, lb_clear = 0, ext_lb_master = 0, ext_lb_sel = 0;
  dly_t ext_est_o [1];
  logic ext_lb_done_o, ext_lb_err_o;
  logic [4:0] ext_tap_o [1];
  logic ext_tap_ld_o [1], ext_link_ok_o [1], ext_train_done_o, ext_train_line, ext_far;
  dly_t delay1 = 8'd5, delay3 = 8'd4;
  dly_t delay2 [1];
  logic [CH-1:0][B-1:0] adc_i = '0;
  logic [B-1:0] threshold = 12'd2000;
  logic loc_trg_o, ae_o, reg_start_o, rec_clear = 0;
  logic [31:0] ts_o, rd_ts_o;
  logic [2:0] rec_count_o;
  logic [15:0] rec_dropped_o;
  logic [1:0] rd_evt = '0, rd_idx = '0;
  logic [CH-1:0][B-1:0] rd_data_o;
  int checks = 0, failures = 0;

  backplane_board #(
    .N_BOARDS(2), .CHANNELS(CH), .ADC_BITS(B), .WINDOW(W), .DEPTH(DP), .TS_W(32),
    .NTAPS(32), .T_CYCLES(T), .SETTLE(4), .MAX_DELAY(16)
  ) dut (.*);
  always #5 clk = ~clk;

  // line source: LFSR stream in training, a level otherwise
  logic [15:0] s = 16'h4321;
  logic level = 0, src;
  always @(posedge clk) s <= {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
  assign src = (mode == MODE_TRAIN) ? s[0] : level;
  idelaye2_model #(.TPU(TPU), .NTAPS(32)) u_dly (
    .clk, .phase(6), .jit(2), .ld(tap_ld_o), .tap(tap_o), .din(src), .dout(line_i)
  );

  // partner board for the ExtTrg loopback: cable, echo registers, cable
  logic p_in, p_out;
  logic [2:0] p_echo = '0;
  pcb_delay_line u_p_dn (.clk, .delay_cycles(5), .d(ext_trg_o), .q(p_in));
  always @(posedge clk) p_echo <= {p_echo[1:0], p_in};
  pcb_delay_line u_p_up (.clk, .delay_cycles(5), .d(p_echo[2]), .q(p_out));
  assign ext_from_model = p_out;
  // training: own ExtTrg stream back through a cable and a delay element
  pcb_delay_line u_e_lb (.clk, .delay_cycles(3), .d(ext_trg_o), .q(ext_far));
  idelaye2_model #(.TPU(TPU), .NTAPS(32)) u_edly (
    .clk, .phase(10), .jit(2), .ld(ext_tap_ld_o[0]), .tap(ext_tap_o[0]), .din(ext_far),
    .dout(ext_train_line)
  );
  assign ext_trg_i[0] = (mode == MODE_TRAIN) ? ext_train_line :
                        use_model ? ext_from_model : ext_drive;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // clocks from now until sig is 1, sampled after each rising edge
  task automatic wait_for(ref logic sig, output int n);
    n = 0;
    while (!sig && n < 200) begin @(posedge clk); #1 n++; end
  endtask

  initial begin
    int n, t0;
    delay2[0] = 8'd3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // --- training: phase 6, jit 2, TPU 16: good taps have (6+t)%16 in 2..13
    @(negedge clk) mode = MODE_TRAIN;
    @(negedge clk) train_start = 1;
    @(negedge clk) train_start = 0;
    n = 0;
    while (!train_done_o && n < 20000) begin @(posedge clk); n++; end
    #1;
    // windows: t=0..7 (6..13) and t=12..23 (18..29 -> 2..13); widest 12..23
    chk(train_done_o && link_ok_o, "training done, link ok");
    chk(tap_opt_o == 5'd17, $sformatf("tapOptimal %0d", tap_opt_o));
    // ExtTrg input, phase 10: windows 0..3, 8..19, 24..31; widest 8..19
    chk(ext_train_done_o && ext_link_ok_o[0], "ExtTrg input trained");
    chk(ext_tap_o[0] == 5'd13, $sformatf("ExtTrg tapOptimal %0d", ext_tap_o[0]));
    // --- loopback echo
    @(negedge clk) mode = MODE_LOOPBACK;
    repeat (10) @(negedge clk);
    level = 1;
    wait_for(line_i, n);
    #1;
    wait_for(ret_o, n);
    chk(n == 2, $sformatf("echo latency %0d", n));  // sampling edge + 2
    level = 0;
    repeat (10) @(negedge clk);
    chk(!ret_o, "echo released");
    // --- ExtTrg loopback, this board measuring
    @(negedge clk) mode = MODE_EXTLB;
    use_model = 1; ext_lb_master = 1;
    repeat (30) @(negedge clk);
    lb_start = 1; @(negedge clk) lb_start = 0;
    repeat (60) @(negedge clk);
    chk(ext_lb_done_o && !ext_lb_err_o, "ExtTrg loopback done");
    chk(dut.g_ext_lb[0].count == 16'd16, $sformatf("ExtTrg round trip %0d", dut.g_ext_lb[0].count));
    chk(ext_est_o[0] == 8'd5, $sformatf("ExtTrg one-way estimate %0d", ext_est_o[0]));
    lb_clear = 1; @(negedge clk) lb_clear = 0;
    repeat (30) @(negedge clk);
    chk(!ext_trg_o, "ExtTrg released");
    // --- ExtTrg loopback, this board echoing
    use_model = 0; ext_lb_master = 0;
    repeat (5) @(negedge clk);
    ext_drive = 1;
    @(posedge clk); #1;
    wait_for(ext_trg_o, n);
    chk(n == 2, $sformatf("ExtTrg echo latency %0d", n));
    ext_drive = 0;
    repeat (10) @(negedge clk);
    chk(!ext_trg_o, "ExtTrg echo released");
    // --- run: Algorithm Enable
    @(negedge clk) mode = MODE_RUN;
    repeat (5) @(negedge clk);
    level = 1;
    wait_for(line_i, n);
    wait_for(ae_o, n);
    chk(n == 1 + 4, $sformatf("AE latency %0d", n));  // sampling edge + 1 + Delay3
    @(posedge clk); #1;
    chk(ts_o == 0, "timestamp restarted by AE");
    repeat (20) @(negedge clk);
    // local hit on channel 2
    adc_i[2] = 12'd2500;
    @(negedge clk) adc_i[2] = 12'd0;
    t0 = int'(ts_o);
    wait_for(loc_trg_o, n);
    chk(n == 0, "LocTrg one clock after the sample");
    @(posedge clk); #1 chk(ext_trg_o, "ExtTrg out");
    wait_for(reg_start_o, n);
    chk(n == 5, $sformatf("local registration after Delay1+1: %0d", n));
    repeat (20) @(negedge clk);
    // incoming ExtTrg
    ext_drive = 1;
    @(negedge clk) ext_drive = 0;
    wait_for(reg_start_o, n);
    chk(n == 2 + 3, $sformatf("ExtTrg registration %0d", n));
    repeat (20) @(negedge clk);
    chk(rec_count_o == 2, $sformatf("two events stored %0d", rec_count_o));
    // the stored timestamp is the one of the clock on which Data registration
    // start is high: LocTrg clock t0 plus Delay1 (5) plus the output register
    @(negedge clk) rd_evt = 0;
    @(negedge clk);
    chk(rd_ts_o == 32'(t0 + 5 + 1), $sformatf("event 0 ts %0d (t0 %0d)", rd_ts_o, t0));
    // AE off blocks registration
    level = 0;
    repeat (20) @(negedge clk);
    ext_drive = 1;
    @(negedge clk) ext_drive = 0;
    repeat (20) @(negedge clk);
    chk(rec_count_o == 2, "no registration without Algorithm Enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
