// dsss_decoder: despreading of one receiver lane.
//
// Each 312.5 MHz cycle brings eight 4-bit ADC samples s_k (chip k = sample k).
// The decoder correlates them with the lane's Hadamard code mapped to +/-1:
//   corr = sum_k (C[k] ? +s_k : -s_k)
// and decides 1 when corr > MARGIN * (chips / 2). A transmitter sending ~C
// gives a negative correlation; other transmitters on the same carrier using
// another code of the same size add zero because the codes are balanced and
// orthogonal. A silent carrier gives a correlation near 0: the margin (MARGIN
// ADC codes of noise on each '+' chip) makes it decide 0, so an empty slot
// arrives as an all-zero flit, as in the uncoded mode.
//   MODE_C8: one correlation over samples 0..7 -> bits[0]
//   MODE_C4: samples 0..3 -> bits[0], samples 4..7 -> bits[1]
// The document gives the decoder's function and says it omits channel
// compensation; this plain correlator is this design's choice.
// Code registers load on load_code with ce. Output is registered: the bits
// for the samples presented in one ce cycle appear after that ce edge and
// hold for one 312.5 MHz cycle. en low freezes the outputs.
module dsss_decoder
  import mnc_pkg::*;
#(
  parameter int unsigned MARGIN = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       en,
  input  logic       load_code,
  input  code_idx_t  code_idx,
  input  mode_e      mode,
  input  adc_word_t  samples,
  output logic [1:0] bits
);

  logic [3:0]        c4_q;
  word_t             c8_q;
  logic signed [7:0] corr8, corr_lo, corr_hi;
  localparam logic signed [7:0] THR8 = 8'(4 * MARGIN);
  localparam logic signed [7:0] THR4 = 8'(2 * MARGIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c4_q <= code4(2'd0);
      c8_q <= code8(2'd0);
    end else if (ce && load_code) begin
      c4_q <= code4(code_idx);
      c8_q <= code8(code_idx);
    end
  end

  always_comb begin
    corr8   = '0;
    corr_lo = '0;
    corr_hi = '0;
    for (int k = 0; k < 8; k++) begin
      if (c8_q[k]) corr8 = corr8 + $signed({4'b0, samples[k]});
      else         corr8 = corr8 - $signed({4'b0, samples[k]});
    end
    for (int k = 0; k < 4; k++) begin
      if (c4_q[k]) corr_lo = corr_lo + $signed({4'b0, samples[k]});
      else         corr_lo = corr_lo - $signed({4'b0, samples[k]});
      if (c4_q[k]) corr_hi = corr_hi + $signed({4'b0, samples[k+4]});
      else         corr_hi = corr_hi - $signed({4'b0, samples[k+4]});
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bits <= '0;
    else if (ce && en) begin
      case (mode)
        MODE_C8: bits <= {1'b0, corr8 > THR8};
        MODE_C4: bits <= {corr_hi > THR4, corr_lo > THR4};
        default: bits <= '0;
      endcase
    end
  end

endmodule
