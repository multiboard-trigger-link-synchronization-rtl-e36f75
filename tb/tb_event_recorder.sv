// tb_event_recorder: sends registration starts over a running ADC pattern
// whose every sample encodes its own time; reads back each stored window
// and timestamp, checks that the window starts at the start clock and is
// WINDOW samples long, that starts inside a window are merged, that a full
// memory counts dropped starts, and that clear empties it.
module tb_event_recorder;
  localparam int CH = 4, B = 12, W = 4, D = 8, TSW = 32;
  logic clk = 0, rst_n = 0, clear = 0, reg_start_i = 0;
  logic [TSW-1:0] ts_i = '0;
  logic [CH-1:0][B-1:0] adc_i;
  logic busy_o;
  logic [3:0] count_o;
  logic [15:0] dropped_o;
  logic [2:0] rd_evt = '0;
  logic [1:0] rd_idx = '0;
  logic [CH-1:0][B-1:0] rd_data_o;
  logic [TSW-1:0] rd_ts_o;
  int checks = 0, failures = 0;
  int start_ts [$];

  event_recorder #(.CHANNELS(CH), .ADC_BITS(B), .WINDOW(W), .DEPTH(D), .TS_W(TSW)) dut (.*);
  always #5 clk = ~clk;

  // sample of channel c at time t: {c, t[9:0]}
  always_comb for (int c = 0; c < CH; c++) adc_i[c] = {2'(c), ts_i[9:0]};
  always @(posedge clk) ts_i <= ts_i + 1;

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

  task automatic pulse(input int len);
    @(negedge clk);
    reg_start_i = 1;
    start_ts.push_back(int'(ts_i));
    repeat (len) @(negedge clk);
    reg_start_i = 0;
  endtask

  task automatic readback(input int n);
    for (int e = 0; e < n; e++) begin
      for (int i = 0; i < W; i++) begin
        @(negedge clk);
        rd_evt = 3'(e); rd_idx = 2'(i);
        @(negedge clk);
        chk(rd_ts_o == TSW'(start_ts[e]), $sformatf("ts ev%0d", e));
        for (int c = 0; c < CH; c++)
          chk(rd_data_o[c] == {2'(c), 10'(start_ts[e] + i)}, $sformatf("sample ev%0d i%0d c%0d", e, i, c));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    pulse(1);  repeat (10) @(negedge clk);
    pulse(3);  repeat (3) @(negedge clk);
    pulse(1);                       // right after the previous window
    repeat (10) @(negedge clk);
    // a second rise during a window is merged
    pulse(1); @(negedge clk); @(negedge clk);
    reg_start_i = 1; @(negedge clk); reg_start_i = 0;
    repeat (10) @(negedge clk);
    chk(count_o == 4, $sformatf("count %0d", count_o));
    readback(4);
    for (int k = 0; k < 4; k++) begin pulse(1); repeat (8) @(negedge clk); end
    chk(count_o == 8, "full");
    pulse(1); repeat (8) @(negedge clk);
    pulse(2); repeat (8) @(negedge clk);
    chk(count_o == 8 && dropped_o == 2, $sformatf("dropped %0d", dropped_o));
    readback(8);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    chk(count_o == 0 && dropped_o == 0, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
