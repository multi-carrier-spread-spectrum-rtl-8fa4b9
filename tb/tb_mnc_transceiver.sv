// tb_mnc_transceiver: end-to-end test of four wireless interfaces that share
// the four OOK carriers through a behavioural channel and ADC model
// (ook_channel_model). All nodes run with default parameters.
//
// Three configuration phases, each applied to all nodes at once:
//   A  unicast/broadcast: node 0 -> carrier 0 (heard by nodes 1, 2 and 3),
//      node 1 -> carrier 1 (heard by nodes 0 and 2); node 2's router stalls
//      for a while so its flit buffer overflows.
//   B  4-chip multicast on carrier 2 (nodes 0 and 1 transmit together with
//      codes 1 and 2) next to unicast on carrier 0 from node 2.
//   C  8-chip multicast on carrier 3 with nodes 0, 1 and 2 transmitting
//      (codes 1..3) and 4-chip multicast on carrier 1 with two nodes, while
//      node 3 receives on both (many-to-one, many-to-many).
//   D  node 0 streams uncoded on all four carriers at once (4 x 2.5 Gb/s);
//      the flits must leave at four per 32 clk cycles.
// A scoreboard expects every flit at every node whose receiver lane is tuned
// to the sender's carrier, pattern and code, in order; flits lost to an
// overflow must match the overflow pulses. Checked too: the latency from the
// sender's SER(32:1/2/8) taking a flit into its shift register to the
// receiving router, at least and at best 8*(32/w + 3) + 2 clk cycles, and the
// aggregate rate of phase D. Counted, and
// required at least once: each pattern, reconfiguration, broadcast,
// several codes on one carrier, empty slots, overflow, receive-merge
// contention and switched-off sub-blocks.
module tb_mnc_transceiver;
  import mnc_pkg::*;

  localparam int NODES = 4;

  logic clk = 0, rst_n = 0;
  logic       cfg_we [NODES], cfg_rx [NODES], cfg_apply [NODES], cfg_pending [NODES];
  logic [1:0] cfg_lane [NODES];
  lane_cfg_t  cfg_data [NODES];
  logic       tx_valid [NODES], tx_ready [NODES], rx_valid [NODES], rx_ready [NODES];
  flit_t      tx_flit [NODES], rx_flit [NODES];
  logic [1:0] tx_lane [NODES], rx_lane [NODES];
  logic [N_LANES-1:0] tx_chip [NODES], rx_overflow [NODES], rx_idle_slot [NODES];
  logic       adc_strobe [NODES];
  adc_word_t  adc [N_LANES];
  int         amp [N_LANES];

  for (genvar n = 0; n < NODES; n++) begin : g_node
    mnc_transceiver u_dut (
      .clk, .rst_n,
      .cfg_we (cfg_we[n]), .cfg_rx (cfg_rx[n]), .cfg_lane (cfg_lane[n]),
      .cfg_data (cfg_data[n]), .cfg_apply (cfg_apply[n]), .cfg_pending (cfg_pending[n]),
      .tx_valid (tx_valid[n]), .tx_flit (tx_flit[n]), .tx_lane (tx_lane[n]), .tx_ready (tx_ready[n]),
      .rx_valid (rx_valid[n]), .rx_flit (rx_flit[n]), .rx_lane (rx_lane[n]), .rx_ready (rx_ready[n]),
      .tx_chip (tx_chip[n]), .adc_strobe (adc_strobe[n]), .adc_samples (adc),
      .rx_overflow (rx_overflow[n]), .rx_idle_slot (rx_idle_slot[n])
    );
  end

  ook_channel_model #(.NODES(NODES)) u_chan (
    .clk, .strobe (adc_strobe[0]), .tx_chip, .amp, .noise (1'b1), .adc
  );

  always #1 clk = ~clk;

  // record when each lane's serializer takes a flit into its shift register
  for (genvar gn = 0; gn < NODES; gn++) begin : g_mon_n
    for (genvar gl = 0; gl < N_LANES; gl++) begin : g_mon_l
      always @(posedge clk) if (rst_n && g_node[gn].u_dut.g_lane[gl].u_tx.u_ser32.load) begin
        #0.1;
        if (g_node[gn].u_dut.g_lane[gl].u_tx.u_ser32.vld) ld_time[gn][gl].push_back($realtime - 0.1);
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- configuration as the testbench knows it --------------
  lane_cfg_t tcfg [NODES][N_LANES], rcfg [NODES][N_LANES];

  task automatic clear_cfg();
    for (int n = 0; n < NODES; n++)
      for (int l = 0; l < N_LANES; l++) begin
        tcfg[n][l] = '{en: 1'b0, mode: MODE_UNI, code: 2'd0};
        rcfg[n][l] = '{en: 1'b0, mode: MODE_UNI, code: 2'd0};
      end
  endtask

  task automatic apply_cfg();
    for (int n = 0; n < NODES; n++)
      for (int l = 0; l < N_LANES; l++)
        for (int d = 0; d < 2; d++) begin
          cfg_we[n] = 1; cfg_rx[n] = d[0]; cfg_lane[n] = 2'(l);
          cfg_data[n] = d ? rcfg[n][l] : tcfg[n][l];
          @(posedge clk); #0.1 cfg_we[n] = 0;
        end
    for (int n = 0; n < NODES; n++) cfg_apply[n] = 1;
    @(posedge clk); #0.1;
    for (int n = 0; n < NODES; n++) cfg_apply[n] = 0;
    while (cfg_pending[0]) begin @(posedge clk); #0.1; end
  endtask

  // ---------------- router models ----------------------------------------
  typedef struct { int lane; flit_t f; } item_t;
  typedef struct { flit_t f; int src; int seq; } exp_t;
  item_t  txq [NODES][$];
  exp_t   expq [NODES][N_LANES][$];
  int     n_acc [NODES][N_LANES];
  realtime ld_time [NODES][N_LANES][$];   // when each flit entered the shift register
  bit     nogap = 0;
  longint first_acc = -1, last_acc_d = -1;
  bit     phase_d = 0;
  longint cyc = 0;
  int     gap [NODES];
  int     dropped [NODES], ovf [NODES];
  int     min_lat [3], n_rx [3];
  int     n_idle = 0, n_bcast_rx = 0, n_multiuser_rx = 0, n_contention = 0, n_gated = 0;
  int     n_reconfig = 0;
  bit     stall [NODES];

  function automatic int mode_ix(mode_e m);
    return (m == MODE_UNI) ? 0 : (m == MODE_C4) ? 1 : 2;
  endfunction

  // number of nodes transmitting on lane l
  function automatic int senders(int l);
    int s = 0;
    for (int n = 0; n < NODES; n++) s += int'(tcfg[n][l].en);
    return s;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      for (int n = 0; n < NODES; n++) begin
        // transmit handshake
        if (tx_valid[n] && tx_ready[n]) begin
          item_t it;
          int l, listeners;
          it = txq[n].pop_front();
          l = it.lane;
          listeners = 0;
          for (int r = 0; r < NODES; r++)
            if (rcfg[r][l].en && rcfg[r][l].mode == tcfg[n][l].mode &&
                (tcfg[n][l].mode == MODE_UNI || rcfg[r][l].code == tcfg[n][l].code)) begin
              expq[r][l].push_back('{f: it.f, src: n, seq: n_acc[n][l]});
              listeners++;
            end
          n_acc[n][l]++;
          if (listeners > 1) n_bcast_rx++;
          if (phase_d && n == 0) begin
            if (first_acc < 0) first_acc = cyc;
            last_acc_d = cyc;
          end
          gap[n] = (!nogap && $urandom_range(0, 5) == 0) ? $urandom_range(1, 300) : 0;
        end else if (gap[n] > 0) gap[n]--;
        // receive handshake
        if (rx_valid[n] && rx_ready[n]) begin
          int l; bit found;
          l = int'(rx_lane[n]);
          found = 0;
          while (expq[n][l].size() > 0 && !found) begin
            exp_t e;
            e = expq[n][l].pop_front();
            if (e.f == rx_flit[n]) begin
              int mi, lat, full;
              found = 1;
              mi = mode_ix(rcfg[n][l].mode);
              lat = int'(($realtime - ld_time[e.src][l][e.seq]) / 2.0);
              full = 8 * (32 / int'(bits_per_cycle(rcfg[n][l].mode)) + 3) + 2;
              check(lat >= full, $sformatf("node %0d lane %0d latency %0d below %0d", n, l, lat, full));
              n_rx[mi]++;
              if (lat < min_lat[mi]) min_lat[mi] = lat;
              if (mi != 0 && senders(l) > 1) n_multiuser_rx++;
            end else dropped[n]++;
          end
          check(found, $sformatf("node %0d lane %0d unexpected flit %h at %0d", n, l, rx_flit[n], cyc));
        end
        for (int l = 0; l < N_LANES; l++) begin
          ovf[n]  += int'(rx_overflow[n][l]);
          n_idle  += int'(rx_idle_slot[n][l]);
        end
      end
      if ($countones(g_node[2].u_dut.u_acc.lane_rx_valid) > 1) n_contention++;
      // a lane receiving uncoded with its decoder and the other
      // deserializers off, or a lane switched off entirely
      if (g_node[2].u_dut.u_acc.rx_gate[0] == 5'b01001 &&
          g_node[0].u_dut.u_acc.tx_gate[3] == 3'b000) n_gated++;
    end
  end

  // drive the router transmit port from the queue, after each edge
  always @(posedge clk) begin
    #0.1;
    for (int n = 0; n < NODES; n++) begin
      tx_valid[n] = txq[n].size() > 0 && gap[n] == 0;
      tx_flit[n]  = txq[n].size() > 0 ? txq[n][0].f : '0;
      tx_lane[n]  = txq[n].size() > 0 ? 2'(txq[n][0].lane) : 2'd0;
      rx_ready[n] = !stall[n];
    end
  end

  // queue k flits from node n, alternating over the given lanes
  task automatic send(int n, int k, int la, int lb);
    for (int i = 0; i < k; i++) begin
      item_t it;
      it.lane = (i % 2 == 0) ? la : lb;
      it.f    = $urandom | 32'h0000_0100;   // an all-zero flit means "empty slot"
      txq[n].push_back(it);
    end
  endtask

  task automatic drain_and_check(string phase);
    int guard;
    guard = 0;
    while ((txq[0].size() + txq[1].size() + txq[2].size() + txq[3].size()) > 0 && guard < 200000) begin
      @(posedge clk); guard++;
    end
    repeat (8 * 80) @(posedge clk);   // one slot in the holding register plus the link
    for (int n = 0; n < NODES; n++) begin
      for (int l = 0; l < N_LANES; l++)
        check(expq[n][l].size() == 0, $sformatf("%s: node %0d lane %0d missing %0d flits", phase, n, l, expq[n][l].size()));
      check(dropped[n] == ovf[n], $sformatf("%s: node %0d dropped %0d, overflow pulses %0d", phase, n, dropped[n], ovf[n]));
    end
  endtask

  initial begin
    for (int n = 0; n < NODES; n++) begin
      cfg_we[n] = 0; cfg_rx[n] = 0; cfg_apply[n] = 0; cfg_lane[n] = '0; cfg_data[n] = '0;
      tx_valid[n] = 0; tx_flit[n] = '0; tx_lane[n] = '0; rx_ready[n] = 1; stall[n] = 0;
      gap[n] = 0; dropped[n] = 0; ovf[n] = 0;
      for (int l = 0; l < N_LANES; l++) n_acc[n][l] = 0;
    end
    for (int m = 0; m < 3; m++) begin min_lat[m] = 1 << 30; n_rx[m] = 0; end
    amp = '{12, 12, 12, 12};
    clear_cfg();
    repeat (5) @(posedge clk); #0.1 rst_n = 1;

    // ---- phase A: unicast / broadcast ----
    tcfg[0][0] = '{1'b1, MODE_UNI, 2'd0};
    tcfg[1][1] = '{1'b1, MODE_UNI, 2'd0};
    rcfg[1][0] = '{1'b1, MODE_UNI, 2'd0};
    rcfg[2][0] = '{1'b1, MODE_UNI, 2'd0};
    rcfg[2][1] = '{1'b1, MODE_UNI, 2'd0};
    rcfg[0][1] = '{1'b1, MODE_UNI, 2'd0};
    rcfg[3][0] = '{1'b1, MODE_UNI, 2'd0};
    apply_cfg(); n_reconfig++;
    send(0, 40, 0, 0);
    send(1, 40, 1, 1);
    repeat (600) @(posedge clk);
    stall[2] = 1;
    repeat (500) @(posedge clk);
    stall[2] = 0;
    drain_and_check("A");

    // ---- phase B: 4-chip multicast on carrier 2, unicast on carrier 0 ----
    clear_cfg();
    amp = '{12, 12, 6, 12};
    tcfg[0][2] = '{1'b1, MODE_C4, 2'd0};
    tcfg[1][2] = '{1'b1, MODE_C4, 2'd1};
    tcfg[2][0] = '{1'b1, MODE_UNI, 2'd0};
    rcfg[2][2] = '{1'b1, MODE_C4, 2'd0};
    rcfg[1][2] = '{1'b1, MODE_C4, 2'd0};
    rcfg[0][2] = '{1'b1, MODE_C4, 2'd1};
    rcfg[0][0] = '{1'b1, MODE_UNI, 2'd0};
    rcfg[1][0] = '{1'b1, MODE_UNI, 2'd0};
    rcfg[3][2] = '{1'b1, MODE_C4, 2'd1};
    apply_cfg(); n_reconfig++;
    send(0, 16, 2, 2);
    send(1, 16, 2, 2);
    send(2, 30, 0, 0);
    drain_and_check("B");

    // ---- phase C: 8-chip multicast, three senders on carrier 3 ----
    clear_cfg();
    amp = '{12, 4, 12, 4};
    tcfg[0][3] = '{1'b1, MODE_C8, 2'd0};
    tcfg[1][3] = '{1'b1, MODE_C8, 2'd1};
    tcfg[2][3] = '{1'b1, MODE_C8, 2'd2};
    tcfg[0][1] = '{1'b1, MODE_C4, 2'd2};
    tcfg[2][1] = '{1'b1, MODE_C4, 2'd0};
    rcfg[2][3] = '{1'b1, MODE_C8, 2'd0};
    rcfg[0][3] = '{1'b1, MODE_C8, 2'd1};
    rcfg[1][3] = '{1'b1, MODE_C8, 2'd2};
    rcfg[1][1] = '{1'b1, MODE_C4, 2'd2};
    rcfg[0][1] = '{1'b1, MODE_C4, 2'd0};
    rcfg[3][3] = '{1'b1, MODE_C8, 2'd1};
    rcfg[3][1] = '{1'b1, MODE_C4, 2'd2};
    apply_cfg(); n_reconfig++;
    send(0, 12, 3, 1);
    send(1, 8, 3, 3);
    send(2, 12, 3, 1);
    drain_and_check("C");

    // ---- phase D: one node uncoded on all four carriers at full rate ----
    clear_cfg();
    amp = '{12, 12, 12, 12};
    for (int l = 0; l < N_LANES; l++) begin
      tcfg[0][l] = '{1'b1, MODE_UNI, 2'd0};
      rcfg[1][l] = '{1'b1, MODE_UNI, 2'd0};
      rcfg[2 + l / 2][l] = '{1'b1, MODE_UNI, 2'd0};
    end
    nogap = 1;
    apply_cfg(); n_reconfig++;
    phase_d = 1;
    for (int i = 0; i < 48; i++) begin
      item_t it;
      it.lane = i % 4;
      it.f    = $urandom | 32'h0000_0100;
      txq[0].push_back(it);
    end
    drain_and_check("D");
    phase_d = 0;
    check(last_acc_d - first_acc <= 48 / 4 * 32,
          $sformatf("48 flits over four carriers took %0d clk cycles (4 per 32 expected)", last_acc_d - first_acc));

    // ---- latency, rate and coverage ----
    for (int m = 0; m < 3; m++) begin
      int n;
      n = (m == 0) ? 4 : (m == 1) ? 16 : 32;
      check(n_rx[m] > 0, $sformatf("pattern %0d received flits: %0d", m, n_rx[m]));
      check(min_lat[m] == 8 * (n + 3) + 2, $sformatf("pattern %0d min latency %0d clk", m, min_lat[m]));
    end
    check(n_reconfig == 4,     $sformatf("reconfigurations: %0d", n_reconfig));
    check(n_bcast_rx > 0,      $sformatf("flits heard by several nodes: %0d", n_bcast_rx));
    check(n_multiuser_rx > 0,  $sformatf("flits decoded with several codes on the carrier: %0d", n_multiuser_rx));
    check(n_idle > 0,          $sformatf("empty slots: %0d", n_idle));
    check(ovf[2] > 0,          $sformatf("overflows: %0d", ovf[2]));
    check(n_contention > 0,    $sformatf("receive-merge contention cycles: %0d", n_contention));
    check(n_gated > 0,         $sformatf("cycles with sub-blocks switched off: %0d", n_gated));
    $display("flits received (uni/c4/c8): %0d %0d %0d; overflows %0d; empty slots %0d; multi-code flits %0d",
             n_rx[0], n_rx[1], n_rx[2], ovf[2], n_idle, n_multiuser_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
