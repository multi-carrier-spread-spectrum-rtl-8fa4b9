// tb_flit_buffer: random writes and random reader readiness against a
// one-entry reference model: stored flit, valid flag, drop-and-flag when a
// flit arrives at a full buffer that is not being emptied, and store when a
// flit arrives in the cycle the old one leaves.
module tb_flit_buffer;
  import mnc_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_ready = 0, out_valid, overflow;
  flit_t in_flit = '0, out_flit;
  int checks = 0, failures = 0, n_ovf = 0, n_pass = 0;
  logic  m_valid;
  flit_t m_flit;

  flit_buffer dut (.*);

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    m_valid = 0; m_flit = '0;
    repeat (2) @(posedge clk); #0.1 rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      logic pop, ovf;
      in_valid  = ($urandom_range(0, 2) == 0);
      in_flit   = $urandom;
      out_ready = ($urandom_range(0, 3) != 0) && (i % 100 < 80);
      #0.1;
      check(out_valid == m_valid && (!m_valid || out_flit == m_flit), $sformatf("state i=%0d", i));
      pop = m_valid && out_ready;
      ovf = in_valid && m_valid && !out_ready;
      check(overflow == ovf, "overflow flag");
      n_ovf  += int'(ovf);
      n_pass += int'(in_valid && pop);
      if (in_valid && (!m_valid || pop)) begin m_valid = 1; m_flit = in_flit; end
      else if (pop) m_valid = 0;
      @(posedge clk); #0.1;
    end
    check(n_ovf > 0 && n_pass > 0, "overflow and pass-through both exercised");
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
