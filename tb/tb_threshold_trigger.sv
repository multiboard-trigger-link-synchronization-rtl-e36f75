// tb_threshold_trigger: random sample sets with random thresholds, with hits
// on single channels including the first and last; LocTrg must be 1 one
// clock later exactly when some sample exceeds (not equals) the threshold.
module tb_threshold_trigger;
  localparam int CH = 64, B = 12;
  logic clk = 0, rst_n = 0;
  logic [CH-1:0][B-1:0] adc_i = '0;
  logic [B-1:0] threshold = '0;
  logic loc_trg_o;
  int checks = 0, failures = 0, hits = 0;

  threshold_trigger #(.CHANNELS(CH), .ADC_BITS(B)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      threshold = B'($urandom_range(1000, 3000));
      for (int c = 0; c < CH; c++) adc_i[c] = B'($urandom_range(0, int'(threshold)));
      case (k % 4)
        0: adc_i[$urandom_range(0, CH-1)] = threshold + 1'b1;
        1: adc_i[0] = threshold + B'($urandom_range(1, 50));
        2: adc_i[CH-1] = threshold + 1'b1;
        default: ;
      endcase
      exp = 0;
      for (int c = 0; c < CH; c++) if (adc_i[c] > threshold) exp = 1;
      if (exp) hits++;
      @(posedge clk); #1;
      checks++;
      if (loc_trg_o != exp) begin failures++; $display("FAIL k=%0d", k); end
    end
    checks++;
    if (hits == 0 || hits == 2000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
