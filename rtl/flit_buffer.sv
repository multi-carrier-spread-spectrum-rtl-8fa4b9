// flit_buffer: the one-flit buffer behind each deserializer.
//
// Holds one 32-bit flit until the access control takes it (out_valid &&
// out_ready). The wireless link has no back-pressure, so a flit that arrives
// while the buffer is full and not being emptied in the same cycle is lost;
// overflow pulses for that cycle. A flit arriving in the cycle the old one
// leaves is stored. Taking a flit and storing one both act on the clk edge.
// The document names the buffer and its one-flit depth; the drop-on-full
// rule is this design's choice.
module flit_buffer
  import mnc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_ready,
  output logic  overflow
);

  logic pop;

  assign pop      = out_valid && out_ready;
  assign overflow = in_valid && out_valid && !out_ready;

  // a held flit stays unchanged until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_flit));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_flit  <= '0;
    end else if (in_valid && (!out_valid || pop)) begin
      out_valid <= 1'b1;
      out_flit  <= in_flit;
    end else if (pop) begin
      out_valid <= 1'b0;
    end
  end

endmodule
