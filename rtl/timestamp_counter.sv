// timestamp_counter: board timestamp, aligned by Algorithm Enable.
//
// The counter advances by one every clock. On the clock where the (delayed)
// Algorithm Enable rises it restarts from 0, so boards whose Algorithm Enable
// edges have been aligned count in step and give the same timestamp to the
// same moment. Using Algorithm Enable to synchronize the timestamp follows
// the published scheme; the width and the restart value are own choices.
module timestamp_counter #(
  parameter int unsigned TS_W = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sync_i,   // delayed Algorithm Enable
  output logic [TS_W-1:0] ts_o
);

  logic sync_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q <= 1'b0;
      ts_o   <= '0;
    end else begin
      sync_q <= sync_i;
      if (sync_i && !sync_q) ts_o <= '0;
      else                   ts_o <= ts_o + 1'b1;
    end
  end

endmodule
