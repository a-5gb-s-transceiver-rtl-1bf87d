// xcvr_pkg: constants and small helpers shared by the 5 Gb/s ADC-based
// transceiver. Numbers that come from the design description: 16-bit
// parallel transmit words, 5-bit ADC samples, 4-way interleaving, 16 samples
// per 625 MHz back-end cycle (two samples per unit interval, so 8 UI per
// cycle), 10-bit FFE outputs, 5-bit tap coefficients and a 3-bit
// zero-crossing phase code (eighths of a UI). The signed sample offset and
// the encodings of the enum types are this design's own choices.
package xcvr_pkg;

  localparam int unsigned TX_W     = 16;  // transmit parallel word
  localparam int unsigned ADC_B    = 5;   // ADC resolution
  localparam int unsigned N_ADC    = 4;   // interleaved ADC channels
  localparam int unsigned N_PAR    = 16;  // samples per back-end cycle
  localparam int unsigned UI_PER_CYC = N_PAR / 2;  // 8 UI per cycle
  localparam int unsigned FFE_W    = 10;  // FFE output width
  localparam int unsigned COEF_W   = 5;   // tap coefficient width
  localparam int unsigned PH_B     = 3;   // phase code bits (1/8 UI)
  localparam int unsigned RXD_W    = 17;  // RXDO width

  // Data-width code carried with each 312.5 MHz receive word (RXVALID).
  typedef enum logic [1:0] {
    RXV_15 = 2'b00,   // RXDO[14:0] valid
    RXV_16 = 2'b01,   // RXDO[15:0] valid
    RXV_17 = 2'b10,   // RXDO[16:0] valid
    RXV_NONE = 2'b11  // unused
  } rxvalid_e;

  // Phase-slip event detected from the averaged zero-crossing phase.
  typedef enum logic [1:0] {
    SLIP_NONE   = 2'b00,  // 8 bits this cycle
    SLIP_FASTER = 2'b01,  // incoming data faster: 9 bits
    SLIP_SLOWER = 2'b10   // incoming data slower: 7 bits
  } slip_e;

  // Three-valued sign used by the sign-sign CMA update.
  function automatic logic signed [1:0] sgn3(input logic signed [31:0] v);
    if (v > 0)      return 2'sd1;
    else if (v < 0) return -2'sd1;
    else            return 2'sd0;
  endfunction

  // Position of a zero crossing between two consecutive half-UI samples a
  // (earlier) and b (later) of opposite sign, by linear interpolation:
  // t = |a| / (|a| + |b|) of the half-UI, rounded to quarters, 0..4.
  // Computed with comparisons only: q counts the k in 0..3 for which
  // 8|a| >= (2k+1)(|a|+|b|).
  function automatic logic [2:0] zc_quarter(input logic signed [15:0] a,
                                            input logic signed [15:0] b);
    automatic int unsigned ma = (a < 0) ? int'(-int'(a)) : int'(a);
    automatic int unsigned mb = (b < 0) ? int'(-int'(b)) : int'(b);
    automatic logic [2:0] q = '0;
    for (int k = 0; k < 4; k++)
      if (8 * ma >= (2 * k + 1) * (ma + mb)) q = q + 1'b1;
    return q;
  endfunction

endpackage
