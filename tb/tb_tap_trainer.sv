// tb_tap_trainer: runs full tap sweeps against the input-delay model for
// several line phases and for a dead line. The expected good taps, the
// widest window and the tap loaded at the end (tapStart + (tapEnd -
// tapStart)/2) are computed here from the model's formula.
module tb_tap_trainer;
  localparam int NTAPS = 32, T = 64, SETTLE = 4, TPU = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic din, line, dead = 0;
  logic [4:0] tap_o, tap_start_o, tap_end_o, tap_opt_o;
  logic tap_ld_o, busy_o, done_o, link_ok_o, correct_o;
  logic [NTAPS-1:0] pass_map_o;
  int phase = 0, jit = 2;
  int checks = 0, failures = 0;

  tap_trainer #(.NTAPS(NTAPS), .T_CYCLES(T), .SETTLE(SETTLE)) dut (.*);
  idelaye2_model #(.TPU(TPU), .NTAPS(NTAPS)) u_dly (
    .clk, .phase, .jit, .ld(tap_ld_o), .tap(tap_o), .din(line), .dout(din)
  );
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitted stream
  logic [15:0] s = 16'hBEEF;
  always @(posedge clk) begin
    s <= {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
  end
  assign line = dead ? 1'b0 : s[0];

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic sweep(input int ph, input int j, input logic is_dead);
    logic [NTAPS-1:0] good;
    int bs, be, bl, ws, n;
    logic any;
    phase = ph; jit = j; dead = is_dead;
    good = '0; any = 0; bl = 0; bs = 0; be = 0; ws = 0;
    for (int t = 0; t < NTAPS; t++) begin
      int pos;
      pos = (ph + t) % TPU;
      good[t] = !is_dead && pos >= j && pos < TPU - j;
    end
    for (int t = 0; t < NTAPS; t++) begin
      if (good[t]) begin
        if (t == 0 || !good[t-1]) ws = t;
        if (t - ws + 1 > bl) begin bl = t - ws + 1; bs = ws; be = t; end
        any = 1;
      end
    end
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    n = 0;
    while (!done_o && n < 20000) begin @(posedge clk); n++; end
    #1;
    chk(done_o, "sweep finished");
    chk(pass_map_o == good, $sformatf("pass map ph=%0d got %h exp %h", ph, pass_map_o, good));
    chk(link_ok_o == any, "link_ok");
    if (any) begin
      chk(tap_start_o == 5'(bs) && tap_end_o == 5'(be),
          $sformatf("window %0d..%0d exp %0d..%0d", tap_start_o, tap_end_o, bs, be));
      chk(tap_opt_o == 5'(bs + (be - bs) / 2), "tapOptimal");
      chk(tap_o == tap_opt_o, "optimal tap loaded");
      repeat (5) @(posedge clk);
      chk(u_dly.tap_q == bs + (be - bs) / 2, "delay element holds optimal tap");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    sweep(0, 2, 0);
    sweep(5, 2, 0);
    sweep(11, 3, 0);
    sweep(3, 2, 1);    // dead line: no good tap
    sweep(0, 8, 0);    // eye closed: no good tap
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
