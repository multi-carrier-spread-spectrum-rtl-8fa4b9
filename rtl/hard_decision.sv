// hard_decision: bit slicer of one receiver lane in unicast/broadcast mode.
//
// Each 312.5 MHz cycle the eight 4-bit ADC samples of uncoded OOK chips are
// compared with THRESHOLD: bit k = (sample k >= THRESHOLD). The document names
// the block; the fixed mid-scale threshold is this design's choice. The output
// is registered at the ce edge and holds for one 312.5 MHz cycle; en low
// freezes it.
module hard_decision
  import mnc_pkg::*;
#(
  parameter int unsigned THRESHOLD = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,
  input  logic      en,
  input  adc_word_t samples,
  output word_t     bits
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bits <= '0;
    else if (ce && en)
      for (int k = 0; k < 8; k++) bits[k] <= (32'(samples[k]) >= THRESHOLD);
  end

endmodule
