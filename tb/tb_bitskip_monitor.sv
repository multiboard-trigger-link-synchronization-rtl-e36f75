// tb_bitskip_monitor: checks the pass/fail verdict of the monitor for a
// flag that stays 1, one that drops once (at the start, middle and last
// clock of the window) and one that stays 0, and that the verdict comes
// exactly T_CYCLES clocks after start.
module tb_bitskip_monitor;
  localparam int T = 32;
  logic clk = 0, rst_n = 0, start = 0, flag = 0;
  logic busy_o, done_o, pass_o, changed_o;
  int checks = 0, failures = 0;

  bitskip_monitor #(.T_CYCLES(T)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // run one window; drop the flag on clock `drop` of the window (-1: never,
  // T+1: always 0)
  task automatic run(input int drop, input logic exp_pass);
    int n;
    @(posedge clk); #1;
    start = 1; flag = 1;
    @(posedge clk); #1;
    start = 0;
    n = 0;
    while (!done_o && n < 3*T) begin
      flag = (drop == T+1) ? 1'b0 : (n != drop);
      @(posedge clk); #1;
      n++;
    end
    chk(n == T, $sformatf("window length %0d", n));
    chk(pass_o == exp_pass && changed_o == !exp_pass, $sformatf("verdict drop=%0d", drop));
    flag = 1;
    repeat (3) @(posedge clk);
    #1 chk(pass_o == exp_pass && !busy_o, "verdict held");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(-1, 1'b1);
    run(0, 1'b0);
    run(T/2, 1'b0);
    run(T-1, 1'b0);
    run(T+1, 1'b0);
    run(-1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
