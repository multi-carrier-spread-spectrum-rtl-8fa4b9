// mnc_pkg: types and constants shared by the multi-carrier spread-spectrum
// (MNC-OOK) wireless-interface transceiver.
//
// The transceiver moves 32-bit router flits over four OOK carriers. Each
// carrier lane runs in one of three communication patterns: uncoded
// unicast/broadcast (8 data bits per 312.5 MHz cycle), multicast with a 4-chip
// Hadamard code (2 data bits per cycle) or multicast with an 8-chip Hadamard
// code (1 data bit per cycle). Every carrier carries 8 chips per 312.5 MHz
// cycle, i.e. 2.5 Gchip/s.
//
// Three codes per size group (i = 1..3) serve the four nodes of a cluster.
// Codes are rows 1..3 of the Sylvester Hadamard matrices of order 4 and 8
// (row 0, all ones, is not balanced and is not used). A '+1' entry is chip 1,
// a '-1' entry is chip 0. Chip k of row r is +1 when popcount(r & k) is even.
// Chip k of a code vector sits at bit k and is sent first for k = 0.
package mnc_pkg;

  localparam int unsigned FLIT_W    = 32;  // router interface width
  localparam int unsigned N_LANES   = 4;   // carriers f1..f4
  localparam int unsigned CHIPS     = 8;   // chips per 312.5 MHz cycle
  localparam int unsigned ADC_BITS  = 4;   // ADC resolution

  typedef logic [FLIT_W-1:0]   flit_t;
  typedef logic [CHIPS-1:0]    word_t;
  typedef logic [ADC_BITS-1:0] sample_t;
  typedef sample_t [CHIPS-1:0] adc_word_t; // sample k is chip k

  // Communication pattern of a lane; bits_per_cycle() gives its data rate.
  typedef enum logic [1:0] {
    MODE_UNI = 2'd0,  // unicast/broadcast, no code, 8 bits per cycle
    MODE_C4  = 2'd1,  // multicast, 4-chip code (group j=1), 2 bits per cycle
    MODE_C8  = 2'd2   // multicast, 8-chip code (group j=2), 1 bit per cycle
  } mode_e;

  typedef logic [1:0] code_idx_t;  // 0..2 selects code i = 1..3

  // Configuration of one lane direction.
  typedef struct packed {
    logic      en;
    mode_e     mode;
    code_idx_t code;
  } lane_cfg_t;

  // Sub-block enables the access control hands to a transmitter lane.
  typedef struct packed {
    logic ser_en;   // SER(32:1/2/8)
    logic enc_en;   // DSSS encoder
    logic ser8_en;  // SER(8:1) and, beyond it, the RF front end
  } tx_gate_t;

  // Sub-block enables the access control hands to a receiver lane.
  typedef struct packed {
    logic dec_en;   // DSSS decoder
    logic hd_en;    // hard decision
    logic des1_en;  // DESER(1:32) and its buffer
    logic des2_en;  // DESER(2:32) and its buffer
    logic des8_en;  // DESER(8:32) and its buffer
  } rx_gate_t;

  function automatic int unsigned bits_per_cycle(mode_e m);
    case (m)
      MODE_C4: return 2;
      MODE_C8: return 1;
      default: return 8;
    endcase
  endfunction

  // Hadamard row r (1..N-1) of order n (4 or 8) as a chip vector.
  function automatic word_t hadamard_row(int unsigned n, logic [2:0] r);
    word_t v = '0;
    for (int unsigned k = 0; k < n; k++) v[k] = ~^(r & 3'(k));
    return v;
  endfunction

  function automatic logic [3:0] code4(code_idx_t i);
    return hadamard_row(4, 3'(i) + 3'd1)[3:0];
  endfunction

  function automatic word_t code8(code_idx_t i);
    return hadamard_row(8, 3'(i) + 3'd1);
  endfunction

endpackage
