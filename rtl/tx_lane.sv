// tx_lane: digital transmitter of one carrier f_i.
//
// SER(32:1/2/8) -> DSSS encoder -> Mux -> SER(8:1), as drawn for each carrier
// in the document. The Mux takes the encoder's 8-chip word in the multicast
// modes and the serializer's raw 8-bit chunk in unicast/broadcast mode; a
// slot without a flit is sent as an all-zero word (carrier off).
//
// Timing: a flit is taken into SER(32:1/2/8)'s holding register whenever
// that is free and moves into its shift register at the next slot boundary
// (a ce edge); its first chunk is loaded into SER(8:1) at the following ce
// edge and its first chip appears on chip_out one clk cycle later. A flit occupies 4 (unicast),
// 16 (4-chip code) or 32 (8-chip code) ce cycles. The access control's
// gate bits switch off the sub-blocks a pattern does not use.
module tx_lane
  import mnc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,
  input  lane_cfg_t cfg,
  input  tx_gate_t  gate,
  input  logic      sync,
  input  flit_t     flit,
  input  logic      flit_valid,
  output logic      flit_ready,
  output logic      chip_out
);

  word_t chunk, enc_word, mux_word;
  logic  chunk_valid;

  ser32 u_ser32 (
    .clk, .rst_n, .ce,
    .en          (gate.ser_en),
    .sync,
    .mode        (cfg.mode),
    .flit, .flit_valid, .flit_ready,
    .chunk, .chunk_valid
  );

  dsss_encoder u_enc (
    .clk, .rst_n, .ce,
    .en        (gate.enc_en),
    .load_code (sync),
    .code_idx  (cfg.code),
    .mode      (cfg.mode),
    .data      (chunk[1:0]),
    .word      (enc_word)
  );

  // Mux of the document's figure
  always_comb begin
    if (!chunk_valid || !cfg.en) mux_word = '0;
    else if (cfg.mode == MODE_UNI) mux_word = chunk;
    else                         mux_word = enc_word;
  end

  ser8 u_ser8 (
    .clk, .rst_n, .ce,
    .en       (gate.ser8_en),
    .word     (mux_word),
    .chip_out
  );

endmodule
