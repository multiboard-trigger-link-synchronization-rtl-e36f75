// threshold_trigger: local trigger (LocTrg) from the ADC samples.
//
// Every clock each of the CHANNELS ADC samples is compared with a common
// threshold; LocTrg is 1 for each clock on which at least one sample is
// above it. The output is registered (one clock after the samples).
// Starting registration when the ADC signal exceeds a threshold follows the
// described raw-data algorithm; 64 channels is the input count of one
// backplane board; unsigned samples of 12 bits and a single common
// threshold are this design's own choices.
module threshold_trigger #(
  parameter int unsigned CHANNELS = 64,
  parameter int unsigned ADC_BITS = 12
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [CHANNELS-1:0][ADC_BITS-1:0]  adc_i,
  input  logic [ADC_BITS-1:0]                threshold,
  output logic                               loc_trg_o
);

  logic hit;

  always_comb begin
    hit = 1'b0;
    for (int c = 0; c < int'(CHANNELS); c++) begin
      if (adc_i[c] > threshold) hit = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) loc_trg_o <= 1'b0;
    else        loc_trg_o <= hit;
  end

endmodule
