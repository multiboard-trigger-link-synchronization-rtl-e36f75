// tb_ext_delay_comp: random ExtTrg delay estimates for four boards. For
// every board k and every partner j the testbench works out, from the full
// board-by-board matrix, Delay1 = max + 3 and Delay2 = max - est(j to k),
// and compares them with the block's outputs one clock later.
module tb_ext_delay_comp;
  import trig_pkg::*;
  localparam int N = 4, NE = N - 1;
  logic clk = 0, rst_n = 0;
  dly_t est_i [N][NE];
  dly_t max_o;
  dly_t delay1_o [N];
  dly_t delay2_o [N][NE];
  int checks = 0, failures = 0;

  ext_delay_comp #(.N_BOARDS(N), .EXT_EXTRA(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m [N][N];   // m[j][k]: estimate from board j to board k
    int mx;
    for (int j = 0; j < N; j++) for (int p = 0; p < NE; p++) est_i[j][p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 100; it++) begin
      mx = 0;
      for (int j = 0; j < N; j++)
        for (int k = 0; k < N; k++) begin
          m[j][k] = (j == k) ? 0 : int'($urandom_range(0, 40));
          if (m[j][k] > mx) mx = m[j][k];
        end
      for (int j = 0; j < N; j++)
        for (int k = 0; k < N; k++)
          if (k != j) est_i[j][(k < j) ? k : k - 1] = dly_t'(m[j][k]);
      @(posedge clk); #1;
      checks++;
      if (int'(max_o) != mx) begin failures++; $display("FAIL max"); end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(delay1_o[k]) != mx + 3) begin failures++; $display("FAIL delay1[%0d]", k); end
        for (int j = 0; j < N; j++) if (j != k) begin
          checks++;
          if (int'(delay2_o[k][(j < k) ? j : j - 1]) != mx - m[j][k]) begin
            failures++; $display("FAIL delay2 board %0d from %0d", k, j);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
