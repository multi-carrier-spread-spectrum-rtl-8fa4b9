// ook_channel_model: behavioural model (not synthesizable) of the analog
// path between the transmitters' SER(8:1) outputs and the receivers' ADCs,
// for NODES wireless interfaces sharing four OOK carriers.
//
// Per carrier: each node's OOK modulator, PA, the combiner, antenna and
// channel, LNA and envelope detector are folded into one envelope level,
//   level = sum over nodes of amp[carrier] * chip + noise (0 or 1), capped at 15,
// which is the 4-bit ADC sample. Every node hears the same levels (no path
// loss differences). One sample is taken per clk (2.5 GHz) edge; eight samples
// make one ADC word, completed at the edge where strobe (the receivers'
// 312.5 MHz word strobe) is high, so sample k of a word is chip k of the
// word the transmitters' SER(8:1) loaded one strobe earlier.
module ook_channel_model
  import mnc_pkg::*;
#(
  parameter int NODES = 3
) (
  input  logic                clk,
  input  logic                strobe,
  input  logic [N_LANES-1:0]  tx_chip [NODES],
  input  int                  amp     [N_LANES],
  input  bit                  noise,
  output adc_word_t           adc     [N_LANES]
);

  sample_t acc [N_LANES][CHIPS];

  initial for (int c = 0; c < N_LANES; c++) begin
    adc[c] = '0;
    for (int k = 0; k < CHIPS; k++) acc[c][k] = '0;
  end

  always @(posedge clk) begin
    for (int c = 0; c < N_LANES; c++) begin
      int lvl;
      lvl = (noise && $urandom_range(0, 3) == 0) ? 1 : 0;
      for (int n = 0; n < NODES; n++) if (tx_chip[n][c]) lvl += amp[c];
      if (lvl > 15) lvl = 15;
      for (int k = 0; k < CHIPS - 1; k++) acc[c][k] <= acc[c][k + 1];
      acc[c][CHIPS - 1] <= sample_t'(lvl);
      if (strobe) begin
        for (int k = 0; k < CHIPS - 1; k++) adc[c][k] <= acc[c][k + 1];
        adc[c][CHIPS - 1] <= sample_t'(lvl);
      end
    end
  end

endmodule
