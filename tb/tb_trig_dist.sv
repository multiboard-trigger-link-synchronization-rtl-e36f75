// tb_trig_dist: drives Algorithm Enable, three ExtTrg lines and LocTrg with
// random pulse patterns and random Delay1/Delay2/Delay3 settings, and checks
// Data registration start against a reference built from the input
// histories: AE(t-Delay3) and (LocTrg(t-Delay1) or any ExtTrg_i(t-Delay2_i)),
// registered once. Counts starts caused by LocTrg only and by ExtTrg only.
module tb_trig_dist;
  import trig_pkg::*;
  localparam int NE = 3, MAXD = 16;
  logic clk = 0, rst_n = 0;
  logic ae_i = 0, loc_trg_i = 0;
  logic ext_trg_i [NE];
  dly_t delay1 = '0, delay3 = '0;
  dly_t delay2 [NE];
  logic ae_o, reg_start_o;
  int checks = 0, failures = 0, by_loc = 0, by_ext = 0, gated = 0;
  logic h_ae [$], h_loc [$];
  logic h_ext [NE][$];

  trig_dist #(.N_EXT(NE), .MAX_DELAY(MAXD)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic exp_q = 0;
  initial begin
    for (int i = 0; i < NE; i++) begin ext_trg_i[i] = 0; delay2[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      delay1 = dly_t'($urandom_range(0, MAXD));
      delay3 = dly_t'($urandom_range(0, MAXD));
      for (int i = 0; i < NE; i++) delay2[i] = dly_t'($urandom_range(0, MAXD));
      h_ae.delete(); h_loc.delete();
      for (int i = 0; i < NE; i++) h_ext[i].delete();
      for (int c = 0; c < 300; c++) begin
        logic lo, ex, a, e;
        @(negedge clk);
        // the registered output now shows last cycle's combination
        if (c > MAXD + 2) begin
          checks++;
          if (reg_start_o != exp_q) begin failures++; $display("FAIL k=%0d c=%0d", k, c); end
        end
        ae_i = (c % 100) < 70;
        loc_trg_i = ($urandom_range(0, 15) == 0);
        for (int i = 0; i < NE; i++) ext_trg_i[i] = ($urandom_range(0, 20) == 0);
        h_ae.push_front(ae_i); h_loc.push_front(loc_trg_i);
        for (int i = 0; i < NE; i++) h_ext[i].push_front(ext_trg_i[i]);
        if (c > MAXD + 1) begin
          a  = h_ae[delay3];
          lo = h_loc[delay1];
          ex = 0;
          for (int i = 0; i < NE; i++) ex |= h_ext[i][delay2[i]];
          e = a & (lo | ex);
          if (e && lo && !ex) by_loc++;
          if (e && ex && !lo) by_ext++;
          if (!a && (lo | ex)) gated++;
          exp_q = e;
          #1;
          checks++;
          if (ae_o != a) begin failures++; $display("FAIL ae_o k=%0d c=%0d", k, c); end
        end
      end
    end
    checks++;
    if (by_loc == 0 || by_ext == 0 || gated == 0) begin
      failures++; $display("FAIL coverage loc=%0d ext=%0d gated=%0d", by_loc, by_ext, gated);
    end
    $display("starts by LocTrg %0d, by ExtTrg %0d, gated by AE %0d", by_loc, by_ext, gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
