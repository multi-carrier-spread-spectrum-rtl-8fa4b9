// tb_dsss_decoder: builds ADC words the way a non-coherent OOK receiver sees
// them when one to three nodes transmit on the same carrier with different
// codes (decoder margin 1): each chip adds the node's amplitude when it is 1, plus a DC level
// and a little noise. The decoder tuned to one code must return that node's
// bits whatever the others send. Silence must decode as 0. Codes are
// hand-written Hadamard rows; the output must be registered on ce.
module tb_dsss_decoder;
  import mnc_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0, en = 1, load_code = 0;
  code_idx_t code_idx = '0;
  mode_e mode = MODE_C8;
  adc_word_t samples;
  logic [1:0] bits;
  int checks = 0, failures = 0;

  localparam logic [3:0] H4 [3] = '{4'b0101, 4'b0011, 4'b1001};
  localparam logic [7:0] H8 [3] = '{8'b0101_0101, 8'b0011_0011, 8'b1001_1001};

  dsss_decoder dut (.*);

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // chips of one node for its data bits in the given mode
  function automatic logic [7:0] spread(mode_e m, int c, logic [1:0] d);
    if (m == MODE_C8) return d[0] ? H8[c] : ~H8[c];
    return {d[1] ? H4[c] : ~H4[c], d[0] ? H4[c] : ~H4[c]};
  endfunction

  initial begin
    samples = '0;
    repeat (2) @(posedge clk); #0.1 rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      mode = m ? MODE_C4 : MODE_C8;
      for (int c = 0; c < 3; c++) begin
        code_idx = 2'(c); load_code = 1; ce = 1;
        @(posedge clk); #0.1 load_code = 0; ce = 0;
        for (int t = 0; t < 60; t++) begin
          logic [1:0] d [3];
          logic [7:0] ch [3];
          logic on [3];
          int amp, dc, users, s;
          users = $urandom_range(1, 3);
          amp   = (users == 3) ? 3 : 4;
          dc    = $urandom_range(0, 2);
          for (int u = 0; u < 3; u++) begin
            d[u]  = 2'($urandom);
            ch[u] = spread(mode, u, d[u]);
          end
          // the target node and users-1 of the other two transmit
          on = '{default: 1'b0};
          on[c] = 1'b1;
          if (users >= 2) on[(c + 1) % 3] = 1'b1;
          if (users == 3) on[(c + 2) % 3] = 1'b1;
          for (int k = 0; k < 8; k++) begin
            s = dc + ($urandom_range(0, 3) == 0 ? 1 : 0);
            for (int u = 0; u < 3; u++)
              if (on[u] && ch[u][k]) s += amp;
            samples[k] = 4'(s > 15 ? 15 : s);
          end
          ce = 1; @(posedge clk); #0.1 ce = 0;
          if (mode == MODE_C8) check(bits[0] == d[c][0], $sformatf("C8 code %0d users %0d", c, users));
          else                 check(bits == d[c], $sformatf("C4 code %0d users %0d: %b vs %b", c, users, bits, d[c]));
        end
        // silent carrier, with and without one code of noise on any sample
        for (int t = 0; t < 20; t++) begin
          for (int k = 0; k < 8; k++) samples[k] = (t == 0) ? 4'd0 : 4'($urandom_range(0, 1));
          ce = 1; @(posedge clk); #0.1 ce = 0;
          check(bits == 2'b00, "silence decodes 0");
        end
      end
    end
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
