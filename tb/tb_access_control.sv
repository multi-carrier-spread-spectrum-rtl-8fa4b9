// tb_access_control: configuration phase, gating, transmit steering and
// receive merging of the access control.
// * writes shadow registers and checks nothing changes before cfg_apply;
// * after cfg_apply: new configuration and tx_sync at the next strobe edge,
//   rx_sync exactly RX_DELAY strobes after tx_sync;
// * sub-block enables for every pattern, enabled or not;
// * a flit goes only to the lane it names, and not to a disabled lane;
// * receive merge serves busy lanes round robin and skips idle ones.
module tb_access_control;
  import mnc_pkg::*;

  localparam int RXD = 2;
  logic clk = 0, rst_n = 0, ce, cfg_we = 0, cfg_rx = 0, cfg_apply = 0, cfg_pending;
  logic [1:0] cfg_lane = '0, tx_lane = '0, rx_lane;
  lane_cfg_t cfg_data = '0;
  logic tx_valid = 0, tx_ready, rx_valid, rx_ready = 0, tx_sync, rx_sync, rx_load_code;
  flit_t tx_flit = '0, lane_tx_flit, rx_flit;
  logic [N_LANES-1:0] lane_tx_valid, lane_tx_ready = '1, lane_rx_valid = '0, lane_rx_ready;
  lane_cfg_t tx_cfg [N_LANES], rx_cfg [N_LANES];
  tx_gate_t tx_gate [N_LANES];
  rx_gate_t rx_gate [N_LANES];
  flit_t lane_rx_flit [N_LANES];
  logic [2:0] ph = '0;
  int checks = 0, failures = 0, strobes = 0, tx_sync_at = -1, rx_sync_at = -1;

  access_control #(.RX_DELAY(RXD)) dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) if (rst_n) ph <= ph + 3'd1;
  assign ce = rst_n && ph == 3'd7;
  always @(posedge clk) if (rst_n && ce) begin
    strobes++;
    if (tx_sync) tx_sync_at = strobes;
    if (rx_sync) rx_sync_at = strobes;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write(input bit rx, input int lane, input bit en, input mode_e m, input int c);
    cfg_we = 1; cfg_rx = rx; cfg_lane = 2'(lane); cfg_data = '{en: en, mode: m, code: 2'(c)};
    @(posedge clk); #0.1 cfg_we = 0;
  endtask

  task automatic to_ce();
    while (!ce) begin @(posedge clk); #0.1; end
  endtask

  initial begin
    mode_e modes [4];
    for (int i = 0; i < N_LANES; i++) lane_rx_flit[i] = flit_t'(32'hA000 + i);
    repeat (2) @(posedge clk); #0.1 rst_n = 1;
    modes = '{MODE_UNI, MODE_C4, MODE_C8, MODE_C4};
    for (int i = 0; i < 4; i++) begin
      write(0, i, i != 3, modes[i], i % 3);
      write(1, i, i != 3, modes[3 - i], (i + 1) % 3);
    end
    repeat (20) @(posedge clk); #0.1;
    check(!tx_cfg[0].en && !rx_cfg[0].en && !tx_sync, "shadow only before apply");
    cfg_apply = 1; @(posedge clk); #0.1 cfg_apply = 0;
    to_ce(); @(posedge clk); #0.1;
    for (int i = 0; i < 4; i++) begin
      check(tx_cfg[i].en == (i != 3) && tx_cfg[i].mode == modes[i] && tx_cfg[i].code == 2'(i % 3), "tx cfg applied");
      check(rx_cfg[i].en == (i != 3) && rx_cfg[i].mode == modes[3 - i] && rx_cfg[i].code == 2'((i + 1) % 3), "rx cfg applied");
    end
    check(tx_sync && rx_load_code && !cfg_pending, "tx_sync after apply");
    repeat (8 * (RXD + 3)) @(posedge clk); #0.1;
    check(tx_sync_at > 0 && rx_sync_at - tx_sync_at == RXD, $sformatf("rx_sync %0d strobes after tx_sync", rx_sync_at - tx_sync_at));
    // gating
    for (int i = 0; i < 4; i++) begin
      mode_e tm, rm; bit e; tx_gate_t tg; rx_gate_t rg;
      tm = modes[i]; rm = modes[3 - i]; e = (i != 3);
      tg = '{ser_en: e, enc_en: e && tm != MODE_UNI, ser8_en: e};
      rg = '{dec_en: e && rm != MODE_UNI, hd_en: e && rm == MODE_UNI,
             des1_en: e && rm == MODE_C8, des2_en: e && rm == MODE_C4,
             des8_en: e && rm == MODE_UNI};
      check(tx_gate[i] == tg, $sformatf("tx gate %0d", i));
      check(rx_gate[i] == rg, $sformatf("rx gate %0d", i));
    end
    // transmit steering
    tx_valid = 1; tx_flit = 32'hCAFE_0001;
    for (int i = 0; i < 4; i++) begin
      tx_lane = 2'(i); lane_tx_ready = 4'b0101; #0.1;
      check(lane_tx_valid == ((i != 3) ? 4'(1 << i) : 4'b0) && lane_tx_flit == tx_flit, "steer");
      check(tx_ready == (i == 0 || i == 2), "ready of the named lane");
    end
    tx_valid = 0;
    // receive merge: lanes 0, 1, 3 busy
    begin
      int order [$];
      lane_rx_valid = 4'b1011; rx_ready = 1;
      for (int t = 0; t < 9; t++) begin
        #0.1;
        check(rx_valid && rx_flit == flit_t'(32'hA000 + rx_lane) && lane_rx_ready == 4'(1 << rx_lane), "merge handshake");
        order.push_back(int'(rx_lane));
        @(posedge clk); #0.1;
      end
      for (int t = 0; t < 9; t++)
        check(order[t] == ((t % 3 == 2) ? 3 : t % 3), $sformatf("round robin order %0d: lane %0d", t, order[t]));
      rx_ready = 0; #0.1;
      check(lane_rx_ready == 4'b0, "no ready when router stalls");
      lane_rx_valid = '0; #0.1;
      check(!rx_valid, "no valid when idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
