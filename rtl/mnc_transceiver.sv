// mnc_transceiver: digital part of a multi-carrier non-coherent OOK
// (MNC-OOK) wireless interface for a wireless network-on-chip.
//
// The link bandwidth is split over four carriers f1..f4 (frequency division).
// On each carrier, several nodes can transmit at once using different
// Hadamard codes (direct-sequence spreading); without codes a carrier carries
// one unicast/broadcast stream at full rate. Per carrier:
//   transmit: SER(32:1/2/8) -> DSSS encoder -> Mux -> SER(8:1) -> tx_chip[i]
//   receive : adc_samples[i] -> DSSS decoder / hard decision
//             -> DESER(1:32) / DESER(2:32) / DESER(8:32) -> 1-flit buffers
// and one access control block configures the lanes, gates unused
// sub-blocks, steers router flits to lanes and merges received flits.
// This structure is the document's; interfaces and framing are this
// design's (see the sub-modules).
//
// Clocking: one clock, clk = 2.5 GHz (chip rate). The 312.5 MHz domain of
// the document is a clock enable, ce, high one clk cycle in eight and
// brought out as adc_strobe: an OOK modulator gets one chip per clk cycle
// and the ADC must present eight 4-bit samples (sample k = chip k of the
// 312.5 MHz cycle) that are stable at the clk edge where adc_strobe is high.
// Rates per carrier: 2.5 Gb/s unicast, 625 Mb/s with the 4-chip code,
// 312.5 Mb/s with the 8-chip code.
// The analog front end (OOK modulators, oscillators, PAs, combiner,
// antenna, LNAs, envelope detectors, ADCs) is outside this module.
module mnc_transceiver
  import mnc_pkg::*;
#(
  parameter int unsigned RX_DELAY     = 3,  // link latency in 312.5 MHz cycles
  parameter int unsigned HD_THRESHOLD = 8,  // hard-decision level, ADC codes
  parameter int unsigned DEC_MARGIN   = 1   // despreading dead zone, ADC codes per chip
) (
  input  logic        clk,           // 2.5 GHz
  input  logic        rst_n,
  // configuration (access control)
  input  logic        cfg_we,
  input  logic        cfg_rx,
  input  logic [1:0]  cfg_lane,
  input  lane_cfg_t   cfg_data,
  input  logic        cfg_apply,
  output logic        cfg_pending,
  // router, transmit side (32-bit)
  input  logic        tx_valid,
  input  flit_t       tx_flit,
  input  logic [1:0]  tx_lane,
  output logic        tx_ready,
  // router, receive side (32-bit)
  output logic        rx_valid,
  output flit_t       rx_flit,
  output logic [1:0]  rx_lane,
  input  logic        rx_ready,
  // RF front end
  output logic [N_LANES-1:0] tx_chip,     // to OOK modulators f1..f4
  output logic               adc_strobe,  // 312.5 MHz word strobe
  input  adc_word_t          adc_samples [N_LANES],
  // status
  output logic [N_LANES-1:0] rx_overflow,
  output logic [N_LANES-1:0] rx_idle_slot
);

  logic [2:0] div;
  logic       ce;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= div + 3'd1;
  end
  assign ce         = (div == 3'd7);
  assign adc_strobe = ce;

  logic [N_LANES-1:0] lane_tx_valid, lane_tx_ready;
  flit_t              lane_tx_flit;
  lane_cfg_t          tx_cfg  [N_LANES];
  tx_gate_t           tx_gate [N_LANES];
  logic               tx_sync;
  lane_cfg_t          rx_cfg  [N_LANES];
  rx_gate_t           rx_gate [N_LANES];
  logic               rx_load_code, rx_sync;
  logic [N_LANES-1:0] lane_rx_valid, lane_rx_ready;
  flit_t              lane_rx_flit [N_LANES];

  access_control #(.RX_DELAY(RX_DELAY)) u_acc (
    .clk, .rst_n, .ce,
    .cfg_we, .cfg_rx, .cfg_lane, .cfg_data, .cfg_apply, .cfg_pending,
    .tx_valid, .tx_flit, .tx_lane, .tx_ready,
    .lane_tx_valid, .lane_tx_flit, .lane_tx_ready,
    .tx_cfg, .tx_gate, .tx_sync,
    .rx_cfg, .rx_gate, .rx_load_code, .rx_sync,
    .lane_rx_valid, .lane_rx_flit, .lane_rx_ready,
    .rx_valid, .rx_flit, .rx_lane, .rx_ready
  );

  for (genvar i = 0; i < N_LANES; i++) begin : g_lane
    tx_lane u_tx (
      .clk, .rst_n, .ce,
      .cfg        (tx_cfg[i]),
      .gate       (tx_gate[i]),
      .sync       (tx_sync),
      .flit       (lane_tx_flit),
      .flit_valid (lane_tx_valid[i]),
      .flit_ready (lane_tx_ready[i]),
      .chip_out   (tx_chip[i])
    );

    rx_lane #(.HD_THRESHOLD(HD_THRESHOLD), .DEC_MARGIN(DEC_MARGIN)) u_rx (
      .clk, .rst_n, .ce,
      .cfg       (rx_cfg[i]),
      .gate      (rx_gate[i]),
      .load_code (rx_load_code),
      .sync      (rx_sync),
      .samples   (adc_samples[i]),
      .out_valid (lane_rx_valid[i]),
      .out_flit  (lane_rx_flit[i]),
      .out_ready (lane_rx_ready[i]),
      .overflow  (rx_overflow[i]),
      .idle_slot (rx_idle_slot[i])
    );
  end

endmodule
