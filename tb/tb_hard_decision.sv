// tb_hard_decision: random ADC words, each sample compared with the
// threshold by the testbench; checks that the decision is registered on ce
// and held while ce is low or the block is disabled.
module tb_hard_decision;
  import mnc_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0, en = 1;
  adc_word_t samples;
  word_t bits, exp_bits;
  int checks = 0, failures = 0;

  hard_decision #(.THRESHOLD(8)) dut (.*);

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    samples = '0;
    repeat (2) @(posedge clk); #0.1 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      word_t held;
      for (int k = 0; k < 8; k++) samples[k] = 4'($urandom_range(0, 15));
      if (i % 10 == 0) samples[0] = 4'd8;     // at threshold -> 1
      if (i % 10 == 1) samples[0] = 4'd7;     // just below -> 0
      for (int k = 0; k < 8; k++) exp_bits[k] = samples[k] > 4'd7;
      en = (i % 17 != 5);
      held = bits;
      ce = 1; @(posedge clk); #0.1 ce = 0;
      check(bits == (en ? exp_bits : held), $sformatf("word %0d: %b vs %b", i, bits, exp_bits));
      held = bits;
      for (int k = 0; k < 8; k++) samples[k] = 4'($urandom);
      @(posedge clk); #0.1;
      check(bits == held, "held without ce");
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
