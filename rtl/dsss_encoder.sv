// dsss_encoder: direct-sequence spreading of one transmitter lane.
//
// As in the document, the encoder holds a 4-bit and an 8-bit register
// initialised with the lane's Hadamard codes C_i and outputs either the code
// or its complement: data bit 1 sends C_i, data bit 0 sends ~C_i.
//   MODE_C8: one data bit -> 8 chips,        word = d0 ? C8 : ~C8
//   MODE_C4: two data bits -> 2 x 4 chips,   word[3:0] for d0, word[7:4] for d1
// The code registers are loaded from the code index when load_code is
// sampled with ce (this design loads them at every slot sync). The spreading
// itself is combinational, so the 8-chip word is ready in the same 312.5 MHz
// cycle as its data chunk. With en low the output is all zeros (silence).
// Rows 1..3 of the Sylvester Hadamard matrices are used (see mnc_pkg).
module dsss_encoder
  import mnc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,
  input  logic      en,
  input  logic      load_code,
  input  code_idx_t code_idx,
  input  mode_e     mode,
  input  logic [1:0] data,       // data[0] is the earlier bit
  output word_t     word
);

  logic [3:0] c4_q;
  word_t      c8_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c4_q <= code4(2'd0);
      c8_q <= code8(2'd0);
    end else if (ce && load_code) begin
      c4_q <= code4(code_idx);
      c8_q <= code8(code_idx);
    end
  end

  always_comb begin
    word = '0;
    if (en) begin
      case (mode)
        MODE_C8: word = data[0] ? c8_q : ~c8_q;
        MODE_C4: word = {data[1] ? c4_q : ~c4_q, data[0] ? c4_q : ~c4_q};
        default: word = '0;
      endcase
    end
  end

endmodule
