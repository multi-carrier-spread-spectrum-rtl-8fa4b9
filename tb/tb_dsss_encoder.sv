// tb_dsss_encoder: checks the spreading of 1 and 2 data bits with each of the
// three 4-chip and 8-chip Hadamard codes against hand-written code tables,
// the complement for data 0, and silence when disabled or uncoded.
module tb_dsss_encoder;
  import mnc_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0, en = 0, load_code = 0;
  code_idx_t code_idx = '0;
  mode_e mode = MODE_C8;
  logic [1:0] data = '0;
  word_t word;
  int checks = 0, failures = 0;

  // Hadamard rows 1..3, chip k at bit k ('+' = 1)
  localparam logic [3:0] H4 [3] = '{4'b0101, 4'b0011, 4'b1001};
  localparam logic [7:0] H8 [3] = '{8'b0101_0101, 8'b0011_0011, 8'b1001_1001};

  dsss_encoder dut (.*);

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #0.1 rst_n = 1;
    for (int c = 0; c < 3; c++) begin
      code_idx = 2'(c); load_code = 1; ce = 1; en = 1;
      @(posedge clk); #0.1 load_code = 0; ce = 0;
      code_idx = 2'((c + 1) % 3);        // must not matter until next load
      @(posedge clk); #0.1;
      mode = MODE_C8;
      for (int d = 0; d < 2; d++) begin
        data = 2'(d); #0.1;
        check(word == (d ? H8[c] : ~H8[c]), $sformatf("C8 code %0d data %0d: %b", c, d, word));
      end
      mode = MODE_C4;
      for (int d = 0; d < 4; d++) begin
        data = 2'(d); #0.1;
        check(word[3:0] == (d[0] ? H4[c] : ~H4[c]) && word[7:4] == (d[1] ? H4[c] : ~H4[c]),
              $sformatf("C4 code %0d data %0d: %b", c, d, word));
      end
      en = 0; #0.1 check(word == '0, "disabled silent");
      en = 1; mode = MODE_UNI; #0.1 check(word == '0, "uncoded mode silent");
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
