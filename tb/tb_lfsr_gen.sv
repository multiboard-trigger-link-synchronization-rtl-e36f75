// tb_lfsr_gen: checks the training stream source against an independent
// Galois-free bit-serial reference, the hold behaviour of `en`, and that the
// sequence has the full period 2^16 - 1.
module tb_lfsr_gen;
  import trig_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic bit_o;
  logic [15:0] state_o;
  int checks = 0, failures = 0;

  lfsr_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: taps 16,15,13,4 written out bit by bit
  logic [15:0] ref_s;
  function automatic logic [15:0] ref_step(input logic [15:0] s);
    logic nb;
    nb = s[15] ^ s[14] ^ s[12] ^ s[3];
    return {s[14:0], nb};
  endfunction

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    ref_s = 16'hACE1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(state_o == 16'hACE1, "reset seed");
    en = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ref_s = ref_step(ref_s);
      chk(bit_o == ref_s[0] && state_o == ref_s, $sformatf("step %0d", i));
    end
    en = 0;
    repeat (5) @(negedge clk);
    chk(state_o == ref_s, "hold when en=0");
    // period: back at the starting state after exactly 65535 steps
    begin
      logic [15:0] s0;
      int n;
      s0 = state_o; n = 0;
      en = 1;
      do begin @(negedge clk); n++; end while (state_o != s0 && n < 70000);
      chk(n == 65535, $sformatf("period %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
