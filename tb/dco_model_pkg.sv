// dco_model_pkg: frequency model of the LC DCO for the testbenches (behavioural, not RTL).
//
// f = F_MAX / sqrt(C / C0): the tank frequency falls with the square root of the switched
// capacitance, which is what makes the tuning curve non-linear. The bank has 31 thermometer
// coarse cells of nominal weight CU (each with a random mismatch) and 16 binary fine bits
// of nominal weight LSB*2^j; the ten LSBs sit behind a capacitive divider whose ratio is
// high by up to mism_permille (at most 3%), the same for all ten. The upper bits are exactly
// binary, so the greedy cascaded quantizer has no spare range: divided bits that were light
// would leave a gap of about 1000 x error LSBs below bit 10, while heavy ones leave gaps of at
// most 32 x error + rounding, i.e. 1-2 LSBs, which the clipped residue absorbs. The fine range
// is 1.15 coarse cells, so neighbouring coarse codes overlap. The total range is 7.05-10.25 GHz: a
// 7.15-10.15 GHz chirp and a 3.1 GHz chirp from 10.2 down to 7.1 GHz both fit with margin.
// The cell weights cc[] and cf[] are visible to the testbenches, so they can judge the
// binary-search calibration (overlap_cal_pkg) against the truth.
package dco_model_pkg;

  localparam real F_MAX   = 10.25e9;                // all cells off
  localparam real C_RATIO = (10.25 / 7.05) * (10.25 / 7.05);
  localparam real CU      = (C_RATIO - 1.0) / 32.15; // coarse cell, units of C0
  localparam real LSB     = 1.15 * CU / 65536.0;     // fine LSB, units of C0

  real cc [1:31];
  real cf [0:15];

  function automatic void init(input int mism_permille);
    real div_err;
    for (int i = 1; i <= 31; i++)
      cc[i] = CU * (1.0 + real'(int'($urandom_range(0, 2 * mism_permille)) - mism_permille) / 1000.0);
    // the ten divided LSBs share one ratio error of the capacitive divider
    div_err = 1.0 + real'($urandom_range(0, mism_permille)) / 1000.0;
    for (int j = 0; j < 16; j++)
      cf[j] = LSB * real'(1 << j) * ((j < 10) ? div_err : 1.0);
  endfunction

  function automatic real freq(input logic [31:1] t, input logic [15:0] b);
    real c;
    c = 1.0;
    for (int i = 1; i <= 31; i++) if (t[i]) c += cc[i];
    for (int j = 0; j < 16; j++)  if (b[j]) c += cf[j];
    return F_MAX / $sqrt(c);
  endfunction

endpackage
