// deser: DESER(W:32), collects W-bit chunks into a 32-bit flit.
//
// One instance per chunk width: W = 1 behind the 8-chip decoder, W = 2 behind
// the 4-chip decoder, W = 8 behind the hard decision. One chunk is shifted in
// per 312.5 MHz cycle (ce), the first chunk ending up in flit[W-1:0], so a
// flit takes 32/W cycles. Slot framing (this design's choice): sync sampled
// with ce marks the chunk now at the input as chunk 0 of a slot; afterwards
// every 32/W chunks make a flit. flit_valid pulses for one clk cycle right
// after the ce edge that shifted in the last chunk; flit holds until the next
// ce. en low stops the deserializer and clears its framing.
module deser
  import mnc_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         en,
  input  logic         sync,
  input  logic [W-1:0] chunk,
  output flit_t        flit,
  output logic         flit_valid
);

  localparam int unsigned N = FLIT_W / W;

  logic [5:0] cnt;      // chunks already collected in this slot
  logic       running;
  logic       take;
  logic [5:0] cnt_now;  // index of the chunk at the input

  assign take    = ce && en && (sync || running);
  assign cnt_now = sync ? 6'd0 : cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flit       <= '0;
      cnt        <= '0;
      running    <= 1'b0;
      flit_valid <= 1'b0;
    end else begin
      flit_valid <= 1'b0;
      if (ce && !en) begin
        running <= 1'b0;
      end else if (take) begin
        flit    <= {chunk, flit[FLIT_W-1:W]};
        running <= 1'b1;
        if (cnt_now == 6'(N - 1)) begin
          cnt        <= '0;
          flit_valid <= 1'b1;
        end else begin
          cnt <= cnt_now + 6'd1;
        end
      end
    end
  end

endmodule
