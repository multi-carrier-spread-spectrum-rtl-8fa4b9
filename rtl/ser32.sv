// ser32: SER(32:1/2/8), the first serializer of a transmitter lane.
//
// A 32-bit router flit is cut into chunks of 1, 2 or 8 bits, one chunk per
// 312.5 MHz cycle (a cycle of clk with ce high), so a flit lasts 32, 16 or 4
// cycles: one "slot". The chunk width follows the lane's communication
// pattern: 1 bit feeds the 8-chip code, 2 bits the 4-chip code and 8 bits go
// uncoded (unicast/broadcast). This split is the document's; the slot framing
// below is this design's own choice.
//
// Slot framing: a sync (qualified by ce) starts slot timing. The serializer
// is double-buffered: a flit offered while the holding register is free is
// taken at once (flit_valid && flit_ready at any clk edge), so a router port
// can fill several lanes during one slot. At each slot boundary (sync, or the
// last chunk of a slot) the held flit moves into the shift register; with
// nothing held, a flit offered in that very cycle goes straight through, and
// with no flit at all the slot is sent as silence (chunk_valid low). Chunks
// leave LSB first; chunk 0 appears in the ce cycle after the boundary, so
// back-to-back flits run without a gap. The holding register and the framing
// are this design's choices. en low (lane switched off by the access
// control) freezes the serializer, keeps a held flit and refuses new ones.
module ser32
  import mnc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,          // 312.5 MHz cycle strobe
  input  logic       en,          // lane enable from access control
  input  logic       sync,        // start slot timing (sampled with ce)
  input  mode_e      mode,        // static between syncs
  input  flit_t      flit,
  input  logic       flit_valid,
  output logic       flit_ready,  // holding register free, or emptied now
  output word_t      chunk,       // low 1/2/8 bits valid
  output logic       chunk_valid
);

  flit_t      sreg;
  flit_t      hold;     // next flit
  logic       hold_v;
  logic [4:0] cnt;      // index of the chunk now on the output
  logic       running;  // slot timing started
  logic       vld;
  logic [4:0] last_idx;
  logic       load;
  logic       take;

  always_comb begin
    case (mode)
      MODE_C8: last_idx = 5'd31;
      MODE_C4: last_idx = 5'd15;
      default: last_idx = 5'd3;
    endcase
  end

  assign load       = ce && en && (sync || (running && cnt == last_idx));
  assign flit_ready = en && (!hold_v || load);
  assign take       = flit_valid && flit_ready;

  // holding register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold   <= '0;
      hold_v <= 1'b0;
    end else if (load && hold_v) begin
      hold   <= flit;             // refill in the cycle the held flit leaves
      hold_v <= take;
    end else if (take && !load) begin
      hold   <= flit;
      hold_v <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg    <= '0;
      cnt     <= '0;
      running <= 1'b0;
      vld     <= 1'b0;
    end else if (ce) begin
      if (!en) begin
        running <= 1'b0;
        vld     <= 1'b0;
      end else if (load) begin
        // held flit first, else a flit offered right now, else silence
        sreg    <= hold_v ? hold : (take ? flit : '0);
        vld     <= hold_v || take;
        cnt     <= '0;
        running <= 1'b1;
      end else if (running) begin
        case (mode)
          MODE_C8: sreg <= sreg >> 1;
          MODE_C4: sreg <= sreg >> 2;
          default: sreg <= sreg >> 8;
        endcase
        cnt <= cnt + 5'd1;
      end
    end
  end

  always_comb begin
    case (mode)
      MODE_C8: chunk = {7'b0, sreg[0]};
      MODE_C4: chunk = {6'b0, sreg[1:0]};
      default: chunk = sreg[7:0];
    endcase
  end
  assign chunk_valid = vld && en;

endmodule
