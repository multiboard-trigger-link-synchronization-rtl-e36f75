// tb_trig_delay: random pulse trains through the delay line at random
// settings (0, in range, above MAX_DELAY); the output must equal the input
// exactly min(delay, MAX_DELAY) clocks earlier.
module tb_trig_delay;
  import trig_pkg::*;
  localparam int MAXD = 16;
  logic clk = 0, rst_n = 0, d = 0, q;
  dly_t delay = '0;
  int checks = 0, failures = 0;
  logic hist [$];

  trig_delay #(.MAX_DELAY(MAXD)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      int eff;
      delay = (k % 7 == 0) ? dly_t'(0) : (k % 11 == 0) ? dly_t'(MAXD + 5) : dly_t'($urandom_range(1, MAXD));
      eff = (int'(delay) > MAXD) ? MAXD : int'(delay);
      hist.delete();
      for (int c = 0; c < 200; c++) begin
        @(negedge clk);
        d = ($urandom_range(0, 9) == 0);
        hist.push_front(d);
        #1;
        if (c >= MAXD + 1) begin
          checks++;
          if (q !== hist[eff]) begin failures++; $display("FAIL delay %0d c %0d", delay, c); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
