// tb_loopback_meter: measures loops built from two delay-line models and a
// three-register echo (the far board's resync and output registers) and
// checks DelayReadout = 6 + down + up and TrgDelay = (DelayReadout - 6)/2,
// the timeout error on a broken loop, and the clear of the line.
module tb_loopback_meter;
  import trig_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, clear = 0;
  logic ret_in, line_o, busy_o, done_o, err_o;
  logic [15:0] count_o;
  dly_t trg_delay_o;
  int down = 0, up = 0;
  logic broken = 0;
  int checks = 0, failures = 0;

  loopback_meter #(.INTERNAL_DELAY(3), .TIMEOUT(200), .CNT_W(16)) dut (.*);
  always #5 clk = ~clk;

  logic far_in, far_out, ret_raw;
  logic [2:0] echo = '0;
  pcb_delay_line u_down (.clk, .delay_cycles(down), .d(line_o), .q(far_in));
  always @(posedge clk) echo <= {echo[1:0], far_in & !broken};
  assign far_out = echo[2];
  pcb_delay_line u_up (.clk, .delay_cycles(up), .d(far_out), .q(ret_raw));
  assign ret_in = ret_raw;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic measure(input int dn, input int u);
    int n;
    down = dn; up = u;
    @(posedge clk); #1 clear = 1;
    @(posedge clk); #1 clear = 0;
    repeat (80) @(posedge clk);   // let the loop drain
    #1 chk(!line_o && !done_o, "cleared");
    start = 1;
    @(posedge clk); #1 start = 0;
    chk(line_o && busy_o, "edge sent");
    n = 0;
    while (busy_o && n < 1000) begin @(posedge clk); #1; n++; end
    chk(done_o && !err_o, $sformatf("loopbackDone d=%0d/%0d", dn, u));
    chk(count_o == 16'(6 + dn + u), $sformatf("count %0d exp %0d", count_o, 6 + dn + u));
    chk(trg_delay_o == dly_t'((dn + u) / 2), $sformatf("TrgDelay %0d", trg_delay_o));
    chk(n == 6 + dn + u, "cycles counted by the testbench");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    measure(0, 0);
    measure(3, 3);
    measure(7, 7);
    measure(12, 12);
    measure(5, 6);
    for (int i = 0; i < 5; i++) begin
      int d; d = int'($urandom_range(0, 30));
      measure(d, d);
    end
    // broken loop -> timeout
    broken = 1;
    @(posedge clk); #1 clear = 1;
    @(posedge clk); #1 clear = 0;
    repeat (80) @(posedge clk);
    #1 start = 1;
    @(posedge clk); #1 start = 0;
    repeat (260) @(posedge clk);
    #1 chk(err_o && !done_o && !busy_o, "timeout flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
