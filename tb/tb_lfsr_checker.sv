// tb_lfsr_checker: feeds the checker a reference LFSR stream, then the
// same stream with one bit skipped, a doubled bit, and a stuck line, and
// checks correctTransmission against what each case must give, including
// the LFSR_W-clock seeding time.
module tb_lfsr_checker;
  logic clk = 0, rst_n = 0, restart = 0, din = 0;
  logic seeded_o, valid_o, correct_o;
  int checks = 0, failures = 0;

  lfsr_checker dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] s = 16'h1234;
  function automatic logic [15:0] step(input logic [15:0] x);
    return {x[14:0], x[15] ^ x[14] ^ x[12] ^ x[3]};
  endfunction
  // drive the next stream bit (after the rising edge)
  task automatic send();
    s = step(s);
    din = s[0];
  endtask

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  int bad;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    restart = 1; send();
    @(posedge clk); #1;
    restart = 0;
    // restart cycle consumed one bit; 16 more fill the seed
    for (int i = 0; i < 16; i++) begin
      chk(!seeded_o, "not seeded early");
      send(); @(posedge clk); #1;
    end
    chk(seeded_o && !valid_o, "seeded after 16 bits");
    for (int i = 0; i < 500; i++) begin
      send(); @(posedge clk); #1;
      chk(valid_o && correct_o, "clean stream correct");
    end
    // skip one bit: advance the stream twice
    s = step(s);
    bad = 0;
    for (int i = 0; i < 200; i++) begin
      send(); @(posedge clk); #1;
      if (!correct_o) bad++;
    end
    chk(bad >= 190, $sformatf("skipped bit detected (%0d bad)", bad));
    // restart: locks again
    restart = 1; send(); @(posedge clk); #1; restart = 0;
    for (int i = 0; i < 17; i++) begin send(); @(posedge clk); #1; end
    for (int i = 0; i < 100; i++) begin
      send(); @(posedge clk); #1;
      chk(correct_o, "relocked");
    end
    // doubled bit: hold din one extra clock
    @(posedge clk); #1;
    bad = 0;
    for (int i = 0; i < 200; i++) begin
      send(); @(posedge clk); #1;
      if (!correct_o) bad++;
    end
    chk(bad >= 190, $sformatf("doubled bit detected (%0d bad)", bad));
    // stuck-at-0 line never passes
    restart = 1; din = 0; @(posedge clk); #1; restart = 0;
    bad = 0;
    for (int i = 0; i < 100; i++) begin
      @(posedge clk); #1;
      if (correct_o) bad++;
    end
    chk(bad == 0, "stuck line rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
