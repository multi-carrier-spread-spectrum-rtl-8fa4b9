// tb_tx_lane: one transmitter lane in each pattern. Random flits are offered
// back to back; the chip stream is compared, chip by chip, with chips the
// testbench computes from the flit and a hand-written Hadamard table. Checks
// that the lane, once its holding register is full, takes a flit every 4, 16
// or 32 strobes (2.5 Gb/s, 625 Mb/s, 312.5 Mb/s at 8 clk cycles per strobe),
// and sends silence when it has none.
module tb_tx_lane;
  import mnc_pkg::*;

  logic clk = 0, rst_n = 0, ce, sync = 0;
  lane_cfg_t cfg;
  tx_gate_t gate;
  flit_t flit;
  logic flit_valid, flit_ready, chip_out;
  flit_t q [$];
  int strobes = 0;
  int taken_at [$];
  logic [2:0] ph = '0;
  int checks = 0, failures = 0;

  localparam logic [3:0] H4 [3] = '{4'b0101, 4'b0011, 4'b1001};
  localparam logic [7:0] H8 [3] = '{8'b0101_0101, 8'b0011_0011, 8'b1001_1001};

  tx_lane dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) if (rst_n) ph <= ph + 3'd1;
  assign ce = rst_n && ph == 3'd7;

  // router model
  always @(posedge clk) if (rst_n) begin
    if (flit_valid && flit_ready) begin
      void'(q.pop_front());
      taken_at.push_back(strobes);
    end
    if (ce) strobes++;
  end
  assign flit_valid = q.size() > 0;
  assign flit       = q.size() > 0 ? q[0] : '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected 8 chips of chunk ci of flit f
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
    int n, s0;
    flit_t f [3];
    logic [7:0] got;
    n = 32 / int'(bits_per_cycle(m));
    for (int i = 0; i < 3; i++) f[i] = $urandom;
    taken_at.delete();
    cfg  = '{en: 1'b1, mode: m, code: 2'(c)};
    gate = '{ser_en: 1'b1, enc_en: m != MODE_UNI, ser8_en: 1'b1};
    to_ce(); @(posedge clk); #0.1;
    for (int i = 0; i < 3; i++) q.push_back(f[i]);
    to_ce(); sync = 1; s0 = strobes;
    @(posedge clk); #0.1 sync = 0;
    // four slots: f0, f1, f2, silence
    for (int s = 0; s < 4 * n; s++) begin
      to_ce();                          // chunk s is loaded into SER(8:1) now
      @(posedge clk); #0.1;
      for (int k = 0; k < 8; k++) begin
        got[k] = chip_out;
        if (k < 7) begin @(posedge clk); #0.1; end
      end
      if (s < 3 * n) check(got == chips(m, c, f[s / n], s % n),
                           $sformatf("mode %0d code %0d chunk %0d: %b", m, c, s, got));
      else           check(got == 8'h00, "silent slot");
    end
    check(taken_at.size() == 3 && taken_at[1] == s0 && taken_at[2] == s0 + n,
          $sformatf("mode %0d: flits taken at strobes %p, sync at %0d", m, taken_at, s0));
  endtask

  initial begin
    cfg = '0; gate = '0;
    repeat (2) @(posedge clk); #0.1 rst_n = 1;
    run(MODE_UNI, 0);
    for (int c = 0; c < 3; c++) run(MODE_C4, c);
    for (int c = 0; c < 3; c++) run(MODE_C8, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
