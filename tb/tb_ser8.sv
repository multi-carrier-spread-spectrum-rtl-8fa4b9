// tb_ser8: feeds random 8-chip words at one word per 8 clk cycles and checks
// that the chip stream carries chip 0 first, one chip per clk cycle, with no
// gap between words (8 bits at 312.5 MHz -> 1 bit at 2.5 GHz), and that a
// disabled serializer sends zeros.
module tb_ser8;
  import mnc_pkg::*;

  logic clk = 0, rst_n = 0, ce, en = 1, chip_out;
  word_t word = '0;
  logic [2:0] ph = '0;
  int checks = 0, failures = 0;
  word_t sent [$];

  ser8 dut (.*);

  always #1 clk = ~clk;
  assign ce = rst_n && ph == 3'd7;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) ph <= ph + 3'd1;

  initial begin
    word_t w;
    repeat (2) @(posedge clk); #0.1 rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      // present a word for the coming strobe
      while (!ce) begin @(posedge clk); #0.1; end
      w = word_t'($urandom);
      en = (i != 30);
      word = w;
      @(posedge clk); #0.1;
      for (int k = 0; k < 8; k++) begin
        check(chip_out == (en ? w[k] : 1'b0), $sformatf("word %0d chip %0d", i, k));
        if (k < 7) begin @(posedge clk); #0.1; end
      end
      check(ce == 1'b1, "next word due exactly 8 clk cycles later");
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
