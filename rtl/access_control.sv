// access_control: configuration and flit steering of the wireless interface.
//
// The document gives this block's function: it sets up the communication
// pattern of each carrier, hands the Hadamard codes C_ij to the lanes and
// switches off the sub-blocks a pattern does not use, and it sits between
// the router and the lanes. How it does so here is this design's own:
//
// * Configuration phase. cfg_we writes a shadow register per lane and
//   direction: {en, mode, code}. cfg_apply (any clk cycle) makes the shadow
//   active at the next ce edge. At the ce edge after that, tx_sync starts
//   slot timing in all transmitter lanes; RX_DELAY 312.5 MHz cycles later,
//   rx_sync tells the receiver lanes that the ADC word now present is the
//   first of a slot. All nodes of the WiNoC apply together, so RX_DELAY is
//   the link latency from a transmitter's sync to the receiver's ADC word.
//   Receiver codes load one cycle after the apply edge (rx_load_code).
// * Gating: from the active configuration, tx_gate/rx_gate enable only the
//   serializer, encoder, decoder, slicer and deserializer each lane needs.
// * Transmit: a router flit carries the index of its carrier lane
//   (tx_lane); the flit is handed to that lane and tx_ready is that lane's
//   ready. A flit for a disabled lane waits.
// * Receive: the four lane outputs are merged round robin into one router
//   stream tagged with the lane index (valid/ready, ready may depend on
//   valid).
module access_control
  import mnc_pkg::*;
#(
  parameter int unsigned RX_DELAY = 3   // >= 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  // configuration port
  input  logic        cfg_we,
  input  logic        cfg_rx,      // 0: transmitter, 1: receiver
  input  logic [1:0]  cfg_lane,
  input  lane_cfg_t   cfg_data,
  input  logic        cfg_apply,
  output logic        cfg_pending,
  // router, transmit side
  input  logic        tx_valid,
  input  flit_t       tx_flit,
  input  logic [1:0]  tx_lane,
  output logic        tx_ready,
  // transmitter lanes
  output logic [N_LANES-1:0] lane_tx_valid,
  output flit_t              lane_tx_flit,
  input  logic [N_LANES-1:0] lane_tx_ready,
  output lane_cfg_t          tx_cfg  [N_LANES],
  output tx_gate_t           tx_gate [N_LANES],
  output logic               tx_sync,
  // receiver lanes
  output lane_cfg_t          rx_cfg  [N_LANES],
  output rx_gate_t           rx_gate [N_LANES],
  output logic               rx_load_code,
  output logic               rx_sync,
  input  logic [N_LANES-1:0] lane_rx_valid,
  input  flit_t              lane_rx_flit [N_LANES],
  output logic [N_LANES-1:0] lane_rx_ready,
  // router, receive side
  output logic        rx_valid,
  output flit_t       rx_flit,
  output logic [1:0]  rx_lane,
  input  logic        rx_ready
);

  lane_cfg_t  tx_shadow [N_LANES];
  lane_cfg_t  rx_shadow [N_LANES];
  logic [7:0] rx_cnt;
  logic [1:0] rr;

  // ---------------- configuration ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_LANES; i++) begin
        tx_shadow[i] <= '{en: 1'b0, mode: MODE_UNI, code: '0};
        rx_shadow[i] <= '{en: 1'b0, mode: MODE_UNI, code: '0};
        tx_cfg[i]    <= '{en: 1'b0, mode: MODE_UNI, code: '0};
        rx_cfg[i]    <= '{en: 1'b0, mode: MODE_UNI, code: '0};
      end
      cfg_pending  <= 1'b0;
      tx_sync      <= 1'b0;
      rx_sync      <= 1'b0;
      rx_load_code <= 1'b0;
      rx_cnt       <= '0;
    end else begin
      if (cfg_we) begin
        if (cfg_rx) rx_shadow[cfg_lane] <= cfg_data;
        else        tx_shadow[cfg_lane] <= cfg_data;
      end
      if (cfg_apply) cfg_pending <= 1'b1;
      if (ce) begin
        tx_sync      <= 1'b0;
        rx_load_code <= 1'b0;
        rx_sync      <= 1'b0;
        if (cfg_pending) begin
          for (int i = 0; i < N_LANES; i++) begin
            tx_cfg[i] <= tx_shadow[i];
            rx_cfg[i] <= rx_shadow[i];
          end
          cfg_pending  <= cfg_apply;
          tx_sync      <= 1'b1;
          rx_load_code <= 1'b1;
          rx_cnt       <= 8'(RX_DELAY);
        end else if (rx_cnt != 0) begin
          rx_cnt  <= rx_cnt - 8'd1;
          rx_sync <= (rx_cnt == 8'd1);
        end
      end
    end
  end

  // ---------------- sub-block gating ----------------
  always_comb begin
    for (int i = 0; i < N_LANES; i++) begin
      tx_gate[i].ser_en  = tx_cfg[i].en;
      tx_gate[i].enc_en  = tx_cfg[i].en && tx_cfg[i].mode != MODE_UNI;
      tx_gate[i].ser8_en = tx_cfg[i].en;
      rx_gate[i].dec_en  = rx_cfg[i].en && rx_cfg[i].mode != MODE_UNI;
      rx_gate[i].hd_en   = rx_cfg[i].en && rx_cfg[i].mode == MODE_UNI;
      rx_gate[i].des1_en = rx_cfg[i].en && rx_cfg[i].mode == MODE_C8;
      rx_gate[i].des2_en = rx_cfg[i].en && rx_cfg[i].mode == MODE_C4;
      rx_gate[i].des8_en = rx_cfg[i].en && rx_cfg[i].mode == MODE_UNI;
    end
  end

  // ---------------- transmit steering ----------------
  assign lane_tx_flit = tx_flit;
  always_comb begin
    for (int i = 0; i < N_LANES; i++)
      lane_tx_valid[i] = tx_valid && tx_lane == 2'(i) && tx_cfg[i].en;
  end
  assign tx_ready = lane_tx_ready[tx_lane] && tx_cfg[tx_lane].en;

  // ---------------- receive merge, round robin ----------------
  always_comb begin
    logic [1:0] idx;
    rx_valid      = 1'b0;
    rx_lane       = rr;
    rx_flit       = lane_rx_flit[rr];
    lane_rx_ready = '0;
    for (int k = N_LANES - 1; k >= 0; k--) begin
      idx = rr + 2'(k);
      if (lane_rx_valid[idx]) begin
        rx_valid = 1'b1;
        rx_lane  = idx;
        rx_flit  = lane_rx_flit[idx];
      end
    end
    if (rx_valid) lane_rx_ready[rx_lane] = rx_ready;
  end

  // at most one lane gets the router's flit, and only an enabled one
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(lane_tx_valid));
  // a lane is released only when the router takes its flit
  assert property (@(posedge clk) disable iff (!rst_n)
                   lane_rx_ready != '0 |-> rx_valid && rx_ready && $onehot(lane_rx_ready));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    rr <= '0;
    else if (rx_valid && rx_ready) rr <= rx_lane + 2'd1;
  end

endmodule
