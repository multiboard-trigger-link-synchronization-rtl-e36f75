// tb_signal_dist_board: the master with three boards modelled as delay
// lines and three-register echoes. Checks, mode by mode: idle lines are 0;
// training lines carry the reference LFSR sequence; the loopback test gives
// every board its TrgDelay and Delay3 = max - TrgDelay; a missing echo is
// flagged; in run mode Algorithm Enable follows the tokamak start/stop
// edges with a three-clock latency and appears on every line.
module tb_signal_dist_board;
  import trig_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  link_mode_e mode = MODE_IDLE;
  logic ext_start_i = 0, ext_stop_i = 0, lb_start = 0, lb_clear = 0;
  logic line_o [N];
  logic ret_i [N];
  logic ae_o;
  logic lb_done_o [N], lb_err_o [N];
  logic [15:0] lb_count_o [N];
  dly_t trg_delay_o [N], delay3_o [N];
  dly_t max_delay_o;
  int d [N];
  logic mute [N];
  int checks = 0, failures = 0;

  signal_dist_board #(.N_BOARDS(N), .INTERNAL_DELAY(3), .LB_TIMEOUT(300)) dut (.*);
  always #5 clk = ~clk;

  for (genvar b = 0; b < N; b++) begin : g_far
    logic far_in, far_out;
    logic [2:0] echo = '0;
    pcb_delay_line u_dn (.clk, .delay_cycles(d[b]), .d(line_o[b]), .q(far_in));
    always @(posedge clk) echo <= {echo[1:0], far_in & !mute[b]};
    pcb_delay_line u_up (.clk, .delay_cycles(d[b]), .d(echo[2]), .q(far_out));
    assign ret_i[b] = far_out;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [15:0] step(input logic [15:0] x);
    return {x[14:0], x[15] ^ x[14] ^ x[12] ^ x[3]};
  endfunction

  initial begin
    logic [15:0] s;
    int mx, n;
    d[0] = 2; d[1] = 9; d[2] = 5;
    for (int b = 0; b < N; b++) mute[b] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // idle
    repeat (3) @(negedge clk);
    for (int b = 0; b < N; b++) chk(line_o[b] == 0, "idle line low");
    // training stream
    s = 16'hACE1;
    @(negedge clk) mode = MODE_TRAIN;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      s = step(s);
      for (int b = 0; b < N; b++) chk(line_o[b] == s[0], $sformatf("train bit %0d line %0d", k, b));
    end
    // loopback
    @(negedge clk) mode = MODE_LOOPBACK;
    repeat (40) @(negedge clk);
    lb_start = 1; @(negedge clk) lb_start = 0;
    repeat (60) @(negedge clk);
    mx = 0;
    for (int b = 0; b < N; b++) if (d[b] > mx) mx = d[b];
    for (int b = 0; b < N; b++) begin
      chk(lb_done_o[b] && !lb_err_o[b], $sformatf("loopbackDone %0d", b));
      chk(lb_count_o[b] == 16'(6 + 2 * d[b]), $sformatf("count %0d = %0d", b, lb_count_o[b]));
      chk(trg_delay_o[b] == dly_t'(d[b]), $sformatf("TrgDelay %0d", b));
      chk(delay3_o[b] == dly_t'(mx - d[b]), $sformatf("Delay3 %0d = %0d", b, delay3_o[b]));
    end
    chk(max_delay_o == dly_t'(mx), "max");
    // broken return on board 1
    lb_clear = 1; @(negedge clk) lb_clear = 0;
    mute[1] = 1;
    repeat (60) @(negedge clk);
    lb_start = 1; @(negedge clk) lb_start = 0;
    repeat (320) @(negedge clk);
    chk(lb_err_o[1] && !lb_done_o[1], "missing echo flagged");
    chk(lb_done_o[0] && lb_done_o[2], "other boards still measured");
    mute[1] = 0;
    lb_clear = 1; @(negedge clk) lb_clear = 0;
    // run: Algorithm Enable
    @(negedge clk) mode = MODE_RUN;
    repeat (5) @(negedge clk);
    chk(!ae_o, "AE low before start");
    ext_start_i = 1;
    n = 0;
    while (!ae_o && n < 20) begin @(negedge clk); n++; end
    chk(n == 3, $sformatf("AE latency %0d", n));
    for (int b = 0; b < N; b++) chk(line_o[b], "AE on line");
    repeat (20) @(negedge clk);
    ext_start_i = 0;
    repeat (10) @(negedge clk);
    chk(ae_o, "AE held after start falls");
    ext_stop_i = 1;
    n = 0;
    while (ae_o && n < 20) begin @(negedge clk); n++; end
    chk(n == 3, "AE clear latency");
    for (int b = 0; b < N; b++) chk(!line_o[b], "AE off line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
