// tb_timestamp_counter: the counter must advance once per clock, restart at
// 0 on the clock where the synchronizing input rises, and ignore a held
// high level and falling edges.
module tb_timestamp_counter;
  logic clk = 0, rst_n = 0, sync_i = 0;
  logic [31:0] ts_o;
  int checks = 0, failures = 0;

  timestamp_counter #(.TS_W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s ts=%0d", msg, ts_o); end
  endtask

  initial begin
    int exp;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    exp = 0;
    for (int k = 0; k < 20; k++) begin
      int gap; gap = int'($urandom_range(3, 200));
      for (int i = 0; i < gap; i++) begin
        @(posedge clk); #1 exp++;
        chk(ts_o == 32'(exp), "counting");
      end
      sync_i = 1;                 // rises: next edge restarts the count
      @(posedge clk); #1 exp = 0;
      chk(ts_o == 0, "restart on rising edge");
      for (int i = 0; i < 10; i++) begin
        @(posedge clk); #1 exp++;
        chk(ts_o == 32'(exp), "level held: keeps counting");
      end
      sync_i = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
