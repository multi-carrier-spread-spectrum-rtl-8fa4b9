// tb_deser: DESER(1:32), DESER(2:32) and DESER(8:32) side by side. After a
// sync each gets random flits chunk by chunk, LSB chunk first, one chunk per
// strobe (strobes every 4 clk cycles). Checks the reassembled flit, that
// flit_valid pulses for exactly one clk cycle after every 32/W strobes, a
// resync in mid-flit, and that a disabled deserializer produces nothing.
module tb_deser;
  import mnc_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0, en = 0, sync = 0;
  logic [0:0] c1; logic [1:0] c2; logic [7:0] c8;
  flit_t f1, f2, f8;
  logic v1, v2, v8;
  int checks = 0, failures = 0;
  int nv [3];

  deser #(.W(1)) d1 (.clk, .rst_n, .ce, .en, .sync, .chunk(c1), .flit(f1), .flit_valid(v1));
  deser #(.W(2)) d2 (.clk, .rst_n, .ce, .en, .sync, .chunk(c2), .flit(f2), .flit_valid(v2));
  deser #(.W(8)) d8 (.clk, .rst_n, .ce, .en, .sync, .chunk(c8), .flit(f8), .flit_valid(v8));

  always #1 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    nv[0] += int'(v1); nv[1] += int'(v2); nv[2] += int'(v8);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // present chunk index s of the three streams, strobe, and check outputs
  task automatic step(input int s, input flit_t a, input flit_t b, input flit_t c);
    int i1, i2, i8;
    i1 = s % 32; i2 = s % 16; i8 = s % 4;
    c1 = a[i1]; c2 = 2'(b >> (2 * i2)); c8 = 8'(c >> (8 * i8));
    ce = 1; @(posedge clk); #0.1 ce = 0; sync = 0;
    check(v1 == (en && i1 == 31) && (!v1 || f1 == a), $sformatf("deser1 s=%0d", s));
    check(v2 == (en && i2 == 15) && (!v2 || f2 == b), $sformatf("deser2 s=%0d", s));
    check(v8 == (en && i8 == 3)  && (!v8 || f8 == c), $sformatf("deser8 s=%0d", s));
    @(posedge clk); #0.1;
    check(!v1 && !v2 && !v8, "valid lasts one clk cycle");
    repeat (2) @(posedge clk); #0.1;
  endtask

  initial begin
    flit_t a, b, c;
    nv = '{0, 0, 0};
    c1 = '0; c2 = '0; c8 = '0;
    repeat (2) @(posedge clk); #0.1 rst_n = 1; en = 1;
    // a few strobes of junk before sync: nothing may come out
    for (int s = 0; s < 40; s++) begin
      c1 = 1'($urandom); c2 = 2'($urandom); c8 = 8'($urandom);
      ce = 1; @(posedge clk); #0.1 ce = 0;
      check(!v1 && !v2 && !v8, "no flit before sync");
    end
    // resync at s = 0, 64 slots of data; another resync mid-way
    for (int pass = 0; pass < 2; pass++) begin
      sync = 1;
      for (int s = 0; s < 64; s++) begin
        if (s % 32 == 0) a = $urandom;
        if (s % 16 == 0) b = $urandom;
        if (s % 4 == 0)  c = $urandom;
        step(s, a, b, c);
      end
    end
    check(nv[0] == 4 && nv[1] == 8 && nv[2] == 32, $sformatf("flit counts %0d %0d %0d", nv[0], nv[1], nv[2]));
    en = 0;
    for (int s = 0; s < 40; s++) step(s, a, b, c);
    check(nv[0] == 4 && nv[1] == 8 && nv[2] == 32, "disabled: no flits");
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
