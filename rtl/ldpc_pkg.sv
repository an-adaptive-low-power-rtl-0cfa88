// ldpc_pkg: constants, types and the code construction shared by the adaptive
// LDPC decoder and its SNR front end.
//
// The decoder works on a (3,6)-regular, rate-1/2 quasi-cyclic LDPC code of
// length 2*LANES*P (9216 with the default P = 576) and 4608 checks, the same
// size as the CMMB rate-1/2 code the decoder is dimensioned for. The
// parity-check matrix is an 8 x 16 array of P x P blocks, each either zero
// or a cyclically shifted identity:
//   * row block r (checks r*P .. r*P+P-1) is served by check node unit r;
//   * its six non-zero blocks are visited in slot order s = 0..5; slot s lies
//     in column block 2*((r+s) mod 8) + (s mod 2), i.e. in memory bank
//     (r+s) mod 8, half (s mod 2);
//   * check i of row block r, slot s, touches bit (i + r*(s+5)) mod P of that
//     column block.
// Column block 2k+h holds bits n = k*2P + h*P + j, so bank k owns the 2P bits
// k*2P .. k*2P+2P-1, and every bit has exactly 3 edges, all in its own bank.
// For a fixed slot the eight check node units read eight different banks,
// which is what lets the crossbar be a plain rotation. The shift rule gives
// no 4-cycles at P = 576 (nor at P = 64, the size used in the testbenches).
//
// The CMMB matrix itself is defined by the broadcast standard and is not
// reproduced here; this construction is this design's own, chosen to fit the
// eight-bank partially parallel datapath.
package ldpc_pkg;

  localparam int LANES    = 8;    // BNUs, message memories and CNUs
  localparam int DV       = 3;    // bit node degree
  localparam int DC       = 6;    // check node degree
  localparam int MSG_W    = 6;    // channel LLR and message width (two's complement)
  localparam int MSG_MAX  = 31;   // messages saturate symmetrically to +/-MSG_MAX
  localparam int SUM_W    = 9;    // width of the a-posteriori sum F + L0 + L1 + L2
  localparam int MAX_ITER = 50;   // iteration limit used for Table-1 style operation
  localparam int ITER_W   = 7;
  localparam int ALPHA_W  = 5;    // min-sum scaling factor in 1/16 units (0..16)

  // SNR grid: index k stands for (-1 + 0.5*k) dB, k = 0..26 (-1 dB .. 12 dB)
  localparam int SNR_STEPS = 27;
  localparam int SNR_W     = 5;

  typedef logic signed [MSG_W-1:0] msg_t;
  typedef logic signed [SUM_W-1:0] sum_t;
  typedef logic [ITER_W-1:0]       iter_t;
  typedef logic [SNR_W-1:0]        snr_idx_t;
  typedef logic [ALPHA_W-1:0]      alpha_t;

  typedef enum logic [2:0] {
    ST_IDLE, ST_LOAD, ST_CHECK, ST_BIT, ST_PARITY, ST_UNLOAD
  } dec_state_e;

  typedef enum logic [1:0] {
    AGU_CHECK, AGU_BIT, AGU_PARITY
  } agu_mode_e;

  // Bank (and column-block pair) read by check node unit r in slot s.
  function automatic int bank_of(int r, int s);
    return (r + s) % LANES;
  endfunction

  // Circulant shift of the block in row block r, slot s.
  function automatic int shift_of(int r, int s, int p);
    return (r * (s + 5)) % p;
  endfunction

  // Minimum iteration count at each SNR grid point (Table 1, CMMB rate 1/2,
  // "Min" column). Tentative decision and parity check are skipped in earlier
  // iterations.
  function automatic iter_t min_iter_of(snr_idx_t k);
    case (k)
      5'd0, 5'd1, 5'd2, 5'd3: return iter_t'(50); // -1 .. 0.5 dB
      5'd4:                   return iter_t'(42); //  1.0 dB
      5'd5:                   return iter_t'(10); //  1.5 dB
      5'd6:                   return iter_t'(6);  //  2.0 dB
      5'd7, 5'd8, 5'd9:       return iter_t'(4);  //  2.5 .. 3.5 dB
      5'd10:                  return iter_t'(3);  //  4.0 dB
      5'd11, 5'd12, 5'd13,
      5'd14:                  return iter_t'(2);  //  4.5 .. 6.0 dB
      default:                return iter_t'(1);  //  6.5 dB and above
    endcase
  endfunction

  // Normalised min-sum scaling factor per SNR grid point, in 1/16 units.
  // The values are this design's choice (the structure, a per-SNR table,
  // is the one the decoder is specified with).
  function automatic alpha_t alpha_of(snr_idx_t k);
    if (k < 5'd6)       return alpha_t'(12);  // below 2 dB: 0.75
    else if (k < 5'd11) return alpha_t'(13);  // 2 .. 4 dB: 0.8125
    else                return alpha_t'(14);  // 4.5 dB and above: 0.875
  endfunction

  // SNR decision thresholds for the estimator: round(4096 * 10^((-1+0.5k)/10)),
  // the linear SNR at grid point k in Q4.12.
  localparam int THR_W = 17;
  function automatic logic [THR_W-1:0] snr_threshold(int k);
    case (k)
      0: return 17'd3254;   1: return 17'd3651;   2: return 17'd4096;
      3: return 17'd4596;   4: return 17'd5157;   5: return 17'd5786;
      6: return 17'd6492;   7: return 17'd7284;   8: return 17'd8173;
      9: return 17'd9170;  10: return 17'd10289; 11: return 17'd11544;
     12: return 17'd12953; 13: return 17'd14533; 14: return 17'd16306;
     15: return 17'd18296; 16: return 17'd20529; 17: return 17'd23034;
     18: return 17'd25844; 19: return 17'd28997; 20: return 17'd32536;
     21: return 17'd36506; 22: return 17'd40960; 23: return 17'd45958;
     24: return 17'd51566; 25: return 17'd57858; default: return 17'd64917;
    endcase
  endfunction

  // DVB-S2 start-of-frame pattern, 26 symbols, sent most significant bit
  // first; bit 0 maps to pilot +1 and bit 1 to pilot -1.
  localparam int          SOF_LEN  = 26;
  localparam logic [25:0] SOF_BITS = 26'h18D2E82;

  // Saturate a wide signed value to the message range.
  function automatic msg_t sat_msg(sum_t v);
    if (v > sum_t'(MSG_MAX))       return msg_t'(MSG_MAX);
    else if (v < sum_t'(-MSG_MAX)) return msg_t'(-MSG_MAX);
    else                           return msg_t'(v);
  endfunction

endpackage
