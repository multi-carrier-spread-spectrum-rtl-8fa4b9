// tb_rx_lane: one receiver lane in each pattern. The testbench turns flits
// into ADC words itself: uncoded chips at amplitude 12, or, in the coded
// patterns, the wanted node plus an interfering node on another code at
// amplitude 6 each. Four slots are sent: flit A, flit B, an empty slot and
// flit C, while the reader takes A and then stops. Expected: A arrives
// 32/W + 1 strobes after the slot's first word, B waits in the buffer, the
// empty slot raises idle_slot and C is dropped with overflow.
module tb_rx_lane;
  import mnc_pkg::*;

  logic clk = 0, rst_n = 0, ce, load_code = 0, sync = 0;
  lane_cfg_t cfg;
  rx_gate_t gate;
  adc_word_t samples;
  logic out_valid, out_ready = 1, overflow, idle_slot;
  flit_t out_flit;
  logic [2:0] ph = '0;
  int checks = 0, failures = 0, n_ovf = 0, n_idle = 0;
  flit_t got [$];
  int got_at [$];
  int strobes = 0;

  localparam logic [3:0] H4 [3] = '{4'b0101, 4'b0011, 4'b1001};
  localparam logic [7:0] H8 [3] = '{8'b0101_0101, 8'b0011_0011, 8'b1001_1001};

  rx_lane dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) if (rst_n) ph <= ph + 3'd1;
  assign ce = rst_n && ph == 3'd7;

  always @(posedge clk) if (rst_n) begin
    if (ce) strobes++;
    if (out_valid && out_ready) begin got.push_back(out_flit); got_at.push_back(strobes); end
    n_ovf  += int'(overflow);
    n_idle += int'(idle_slot);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] chips(mode_e m, int c, flit_t f, int ci);
    logic [1:0] d;
    case (m)
      MODE_UNI: return 8'(f >> (8 * ci));
      MODE_C4: begin
        d = 2'(f >> (2 * ci));
        return {d[1] ? H4[c] : ~H4[c], d[0] ? H4[c] : ~H4[c]};
      end
      default: return f[ci] ? H8[c] : ~H8[c];
    endcase
  endfunction

  task automatic to_ce();
    while (!ce) begin @(posedge clk); #0.1; end
  endtask

  task automatic run(input mode_e m, input int c);
    int n, t0, idle_seen;
    flit_t f [4];
    n = 32 / int'(bits_per_cycle(m));
    f[0] = $urandom | 1; f[1] = $urandom | 1; f[2] = '0; f[3] = $urandom | 1;
    got.delete(); got_at.delete(); n_ovf = 0; n_idle = 0;
    cfg  = '{en: 1'b1, mode: m, code: 2'(c)};
    gate = '{dec_en: m != MODE_UNI, hd_en: m == MODE_UNI, des1_en: m == MODE_C8,
             des2_en: m == MODE_C4, des8_en: m == MODE_UNI};
    out_ready = 1;
    to_ce(); load_code = 1; @(posedge clk); #0.1 load_code = 0;
    to_ce(); sync = 1; t0 = strobes;
    for (int s = 0; s < 4 * n + 2; s++) begin
      logic [7:0] w, x;
      w = (s < 4 * n) ? chips(m, c, f[s / n], s % n) : 8'h00;
      x = (s < 4 * n && m != MODE_UNI) ? chips(m, (c + 1) % 3, $urandom, 0) : 8'h00;
      for (int k = 0; k < 8; k++)
        samples[k] = (m == MODE_UNI) ? (w[k] ? 4'd12 : 4'd1)
                                     : 4'((w[k] ? 6 : 0) + (x[k] ? 6 : 0));
      to_ce();
      @(posedge clk); #0.1 sync = 0;
      if (s == n + 1) out_ready = 0;   // reader stops after flit A
    end
    idle_seen = n_idle;   // later all-zero slots are idle too
    repeat (80) @(posedge clk);
    check(got.size() == 1 && got[0] == f[0], $sformatf("mode %0d: flit A received (%0d flits)", m, got.size()));
    if (got.size() >= 1)
      check(got_at[0] - t0 == n + 1, $sformatf("latency %0d strobes, expected %0d", got_at[0] - t0, n + 1));
    check(idle_seen == 1, $sformatf("mode %0d: empty slot seen %0d", m, idle_seen));
    check(n_ovf == 1, "flit C dropped with overflow");
    #0.1 check(out_valid && out_flit == f[1], "flit B waits in the buffer");
    out_ready = 1;
    @(posedge clk); #0.1;
    check(!out_valid && got.size() == 2 && got[1] == f[1], "flit B delivered");
    cfg.en = 0; #0.1;
  endtask

  initial begin
    cfg = '0; gate = '0; samples = '0;
    repeat (2) @(posedge clk); #0.1 rst_n = 1;
    run(MODE_UNI, 0);
    for (int c = 0; c < 3; c++) run(MODE_C4, c);
    for (int c = 0; c < 3; c++) run(MODE_C8, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
