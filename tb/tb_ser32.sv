// tb_ser32: self-checking test of SER(32:1/2/8).
// For each mode a router model offers three flits as fast as the serializer
// takes them. Expected: the first is taken at once into the holding register,
// the second in the strobe cycle of the sync, the third exactly one slot
// (32/w strobes) later. After the sync the output must carry flit 0, flit 1
// and flit 2, chunk by chunk (checked against the flit shifted by hand), and
// then a silent slot. A flit offered in the boundary cycle with nothing held
// must go straight through, and a disabled serializer must refuse flits and
// stay silent.
module tb_ser32;
  import mnc_pkg::*;

  logic clk = 0, rst_n = 0, ce, en = 0, sync = 0;
  mode_e mode = MODE_UNI;
  flit_t flit;
  logic flit_valid, flit_ready, chunk_valid;
  word_t chunk;
  logic [1:0] ph = '0;
  int checks = 0, failures = 0, strobes = 0;
  flit_t q [$];
  int taken_at [$];

  ser32 dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) if (rst_n) ph <= ph + 2'd1;
  assign ce = rst_n && ph == 2'd3;

  // router model: offer the queue head; record the strobe count at each take
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

  task automatic to_ce();
    while (!ce) begin @(posedge clk); #0.1; end
  endtask

  task automatic run_mode(input mode_e m);
    int w, n, s0;
    flit_t f [3];
    w = bits_per_cycle(m); n = 32 / w;
    for (int i = 0; i < 3; i++) f[i] = {$urandom} | 32'h1;
    taken_at.delete();
    mode = m; en = 1;
    to_ce(); @(posedge clk); #0.1;
    for (int i = 0; i < 3; i++) q.push_back(f[i]);
    repeat (8) @(posedge clk); #0.1;
    check(taken_at.size() == 1, "first flit held before sync, second waits");
    to_ce(); sync = 1; s0 = strobes;
    @(posedge clk); #0.1 sync = 0;
    for (int s = 0; s < 4 * n; s++) begin
      int fi, ci;
      fi = s / n; ci = s % n;
      if (fi < 3)
        check(chunk_valid && chunk == word_t'((f[fi] >> (ci * w)) & ((1 << w) - 1)),
              $sformatf("mode %0d flit %0d chunk %0d got %h", m, fi, ci, chunk));
      else
        check(!chunk_valid, "idle slot silent");
      to_ce(); @(posedge clk); #0.1;
    end
    check(taken_at.size() == 3 && taken_at[1] == s0 && taken_at[2] == s0 + n,
          $sformatf("mode %0d take times %p (sync at %0d)", m, taken_at, s0));
    // pass-through: nothing held, flit offered only in the boundary cycle
    while (!(ce && dut.cnt == dut.last_idx)) begin @(posedge clk); #0.1; end
    f[0] = $urandom | 32'h1; q.push_back(f[0]);
    @(posedge clk); #0.1;
    check(q.size() == 0 && chunk_valid && chunk == word_t'(f[0] & ((1 << w) - 1)), "boundary flit goes straight through");
    repeat (4 * n + 2) @(posedge clk);
    en = 0; q.push_back(32'h5);
    repeat (8) @(posedge clk); #0.1;
    check(!chunk_valid && !flit_ready && q.size() == 1, "disabled lane silent and refuses flits");
    q.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk); #0.1 rst_n = 1;
    run_mode(MODE_UNI);
    run_mode(MODE_C4);
    run_mode(MODE_C8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
