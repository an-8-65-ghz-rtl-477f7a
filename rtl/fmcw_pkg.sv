// fmcw_pkg: shared widths, types and default settings of the FMCW PLL digital core.
//
// Number formats used throughout:
//   * Fcw (frequency control word) is unsigned fixed point with FCW_INT integer and
//     FCW_FRAC fractional bits. It is the divide ratio seen by the multi-modulus divider,
//     i.e. f_DCO = 2 * f_ref * Fcw (the factor 2 is the divide-by-2 ahead of the divider,
//     as in the printed setting Fout = 100 MHz x 2 x (50 + 2^-14)).
//   * tw (DCO tuning word) is unsigned, in units of the smallest fine capacitor of the DCO.
//   * DPD coefficients and the Horner accumulator are signed, with COEF_FRAC fractional bits.
// The reference frequency (100 MHz), the 31 thermometer coarse cells, the 16-bit fine bank
// split as 11 quantized bits plus a 5-bit residue, and the chirp defaults (10 GHz/us, 3 GHz,
// 50 ns idle) follow the document; the word widths are this design's own choice.
package fmcw_pkg;

  localparam int unsigned FCW_INT   = 6;
  localparam int unsigned FCW_FRAC  = 16;
  localparam int unsigned FCW_W     = FCW_INT + FCW_FRAC;

  localparam int unsigned TW_W      = 22;   // tuning word, fine-LSB units
  localparam int unsigned N_COARSE  = 31;   // thermometer coarse cells D_CTRLT[31:1]
  localparam int unsigned N_FINE    = 16;   // binary fine bits D_CTRLB[15:0]
  localparam int unsigned N_CASC    = 11;   // 1-bit cascaded quantizers -> D_CTRLB[15:5]
  localparam int unsigned N_RESID   = N_FINE - N_CASC; // residue bits D_CTRLB[4:0]

  localparam int unsigned POLY_ORD  = 8;    // 8th-order polynomial DPD
  localparam int unsigned X_W       = 20;   // normalised DPD input, signed Q1.(X_W-1)
  localparam int unsigned COEF_W    = 40;   // coefficient / accumulator width
  localparam int unsigned COEF_FRAC = 16;   // fractional bits of coefficients

  localparam int unsigned E_W       = 10;   // digitised phase error e[k]
  localparam int unsigned DLF_W     = 16;   // loop-filter output, signed fine-LSB units
  localparam int unsigned DTC_W     = 10;   // DTC control code

  typedef logic [FCW_W-1:0]              fcw_t;
  typedef logic [TW_W-1:0]               tw_t;
  typedef logic signed [COEF_W-1:0]      coef_t;
  typedef logic signed [X_W-1:0]         xnorm_t;

  typedef enum logic [1:0] {
    CHIRP_CW   = 2'd0,   // constant Fcw (fractional-N mode)
    CHIRP_SAW  = 2'd1,   // sawtooth: ramp up, then idle at the start word
    CHIRP_TRI  = 2'd2    // triangular: ramp up, then ramp down
  } chirp_mode_e;

  // Default chirp of the document at f_ref = 100 MHz: 7.15 GHz start,
  // 10 GHz/us slope = 100 MHz per reference cycle, 3 GHz in 30 cycles, 50 ns idle.
  localparam fcw_t        DEF_FCW_START = fcw_t'(35 * 65536 + 49152); // 35.75 -> 7.15 GHz
  localparam fcw_t        DEF_FCW_STEP  = fcw_t'(32768);              // 0.5   -> 100 MHz/cycle
  localparam int unsigned DEF_N_RAMP    = 30;                         // 300 ns ramp
  localparam int unsigned DEF_N_IDLE    = 5;                          // 50 ns idle

endpackage
