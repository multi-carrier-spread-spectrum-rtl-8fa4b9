// rx_lane: digital receiver of one carrier f_i.
//
// The ADC delivers eight 4-bit samples per 312.5 MHz cycle. They go to the
// DSSS decoder (multicast, 4- or 8-chip code) and to the hard decision
// (unicast/broadcast); the decoder's 1- or 2-bit output and the hard
// decision's 8-bit output feed DESER(1:32), DESER(2:32) and DESER(8:32), each
// followed by a one-flit buffer, as in the document. Only the sub-blocks the
// lane's pattern needs are enabled (gate, from the access control); the lane
// output is the buffer of the active pattern.
//
// This design's choices: sync, sampled with ce, marks the ADC word now at
// the input as the first of a slot; decoder and slicer add one 312.5 MHz
// cycle, so the deserializers get sync one cycle later. A slot that arrives
// as an all-zero flit is an empty slot (the transmitter sent silence) and is
// not buffered; idle_slot pulses instead. Codes load on load_code with ce.
module rx_lane
  import mnc_pkg::*;
#(
  parameter int unsigned HD_THRESHOLD = 8,
  parameter int unsigned DEC_MARGIN   = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,
  input  lane_cfg_t cfg,
  input  rx_gate_t  gate,
  input  logic      load_code,
  input  logic      sync,
  input  adc_word_t samples,
  output logic      out_valid,
  output flit_t     out_flit,
  input  logic      out_ready,
  output logic      overflow,
  output logic      idle_slot
);

  logic [1:0] dec_bits;
  word_t      hd_bits;
  logic       sync_d;
  flit_t      f1, f2, f8;
  logic       v1, v2, v8;
  logic [2:0] bv, bov;
  flit_t      bf [3];
  logic [2:0] brdy;
  logic [2:0] wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sync_d <= 1'b0;
    else if (ce) sync_d <= sync;
  end

  dsss_decoder #(.MARGIN(DEC_MARGIN)) u_dec (
    .clk, .rst_n, .ce,
    .en        (gate.dec_en),
    .load_code,
    .code_idx  (cfg.code),
    .mode      (cfg.mode),
    .samples,
    .bits      (dec_bits)
  );

  hard_decision #(.THRESHOLD(HD_THRESHOLD)) u_hd (
    .clk, .rst_n, .ce,
    .en      (gate.hd_en),
    .samples,
    .bits    (hd_bits)
  );

  deser #(.W(1)) u_des1 (
    .clk, .rst_n, .ce, .en(gate.des1_en), .sync(sync_d),
    .chunk(dec_bits[0]), .flit(f1), .flit_valid(v1));
  deser #(.W(2)) u_des2 (
    .clk, .rst_n, .ce, .en(gate.des2_en), .sync(sync_d),
    .chunk(dec_bits), .flit(f2), .flit_valid(v2));
  deser #(.W(8)) u_des8 (
    .clk, .rst_n, .ce, .en(gate.des8_en), .sync(sync_d),
    .chunk(hd_bits), .flit(f8), .flit_valid(v8));

  assign wr = {v8 && f8 != '0, v2 && f2 != '0, v1 && f1 != '0};
  assign idle_slot = (v1 && f1 == '0) || (v2 && f2 == '0) || (v8 && f8 == '0);

  // buffer 0: DESER(1:32), 1: DESER(2:32), 2: DESER(8:32)
  flit_buffer u_buf1 (.clk, .rst_n, .in_valid(wr[0]), .in_flit(f1),
    .out_valid(bv[0]), .out_flit(bf[0]), .out_ready(brdy[0]), .overflow(bov[0]));
  flit_buffer u_buf2 (.clk, .rst_n, .in_valid(wr[1]), .in_flit(f2),
    .out_valid(bv[1]), .out_flit(bf[1]), .out_ready(brdy[1]), .overflow(bov[1]));
  flit_buffer u_buf8 (.clk, .rst_n, .in_valid(wr[2]), .in_flit(f8),
    .out_valid(bv[2]), .out_flit(bf[2]), .out_ready(brdy[2]), .overflow(bov[2]));

  always_comb begin
    brdy = '0;
    case (cfg.mode)
      MODE_C8: begin out_valid = bv[0]; out_flit = bf[0]; brdy[0] = out_ready; end
      MODE_C4: begin out_valid = bv[1]; out_flit = bf[1]; brdy[1] = out_ready; end
      default: begin out_valid = bv[2]; out_flit = bf[2]; brdy[2] = out_ready; end
    endcase
    out_valid = out_valid && cfg.en;
    if (!cfg.en) brdy = '0;
  end

  assign overflow = |bov;

endmodule
