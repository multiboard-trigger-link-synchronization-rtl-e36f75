// tb_delay_comp: random TrgDelay sets for four boards; checks the maximum
// and each board's compensation max - TrgDelay one clock later.
module tb_delay_comp;
  import trig_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  dly_t trg_delay_i [N];
  dly_t max_o;
  dly_t comp_o [N];
  int checks = 0, failures = 0;

  delay_comp #(.N_BOARDS(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) trg_delay_i[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      int mx;
      mx = 0;
      for (int i = 0; i < N; i++) begin
        trg_delay_i[i] = dly_t'($urandom_range(0, (k % 3 == 0) ? 255 : 40));
        if (int'(trg_delay_i[i]) > mx) mx = int'(trg_delay_i[i]);
      end
      @(posedge clk); #1;
      checks++;
      if (int'(max_o) != mx) begin failures++; $display("FAIL max %0d exp %0d", max_o, mx); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(comp_o[i]) != mx - int'(trg_delay_i[i])) begin
          failures++; $display("FAIL comp[%0d]", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
