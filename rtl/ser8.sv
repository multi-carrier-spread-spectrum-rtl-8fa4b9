// ser8: SER(8:1), the 2.5 Gb/s serializer in front of the OOK modulator.
//
// Runs on the 2.5 GHz clock. In the cycle where ce (the 312.5 MHz strobe,
// high one clk cycle in eight) is high, the 8-chip word is loaded; chip k of
// the word is on chip_out during the k-th clk cycle after that edge, chip 0
// first. With en low the lane sends zeros (carrier off). Throughput is one
// word per 8 clk cycles, i.e. 8 bits at 312.5 MHz -> 1 bit at 2.5 GHz, as
// in the document; the chip order is this design's choice.
module ser8
  import mnc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce,
  input  logic  en,
  input  word_t word,
  output logic  chip_out
);

  word_t sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sreg <= '0;
    else if (ce) sreg <= en ? word : '0;
    else         sreg <= sreg >> 1;
  end

  assign chip_out = sreg[0];

endmodule
