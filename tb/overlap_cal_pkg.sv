// overlap_cal_pkg: binary-search foreground calibration of the overlap-correction weights,
// run by the testbench in place of the radar processor's software (not RTL).
//
// It finds the fine weights BIN[5..15] and the cumulative coarse weights TH[1..31] by
// comparing DCO frequencies, here taken from dco_model_pkg. The unit of every weight is one
// step of the 5-bit residue, D_CTRLB[4:0], because that is the unit the overlap correction
// adds without a weight. The order is bottom-up:
//   BIN[j]: the weight w, built only from the already calibrated bits below j, whose
//           frequency matches that of bit j alone;
//   TH[i] : TH[i-1] + the fine weight that, with i-1 coarse cells on, matches the frequency
//           of i cells on and the fine bank empty.
// Each search runs over weights, not raw codes. A weight is turned into a code by the same
// greedy split the cascaded quantizer performs, so frequency is monotone in the weight
// even where the raw binary code is not. The last step is linearly interpolated, which also
// covers BIN[5]: it is one unit heavier than the largest residue.
// The binary search is the method the reference design names; this weight-domain form, the
// interpolation and the unit are this testbench's own choices.
package overlap_cal_pkg;

  typedef longint bin_arr_t [5:15];
  typedef longint th_arr_t  [1:31];

  // greedy split of weight w over fine bits hi-1..5 and the residue (clipped to 0..31)
  function automatic logic [15:0] fine_code(input longint w, input int hi, input bin_arr_t bw);
    logic [15:0] b;
    b = '0;
    for (int j = hi - 1; j >= 5; j--)
      if (w >= bw[j]) begin
        b[j] = 1'b1;
        w -= bw[j];
      end
    if (w > 31) w = 31;
    if (w < 0)  w = 0;
    b[4:0] = 5'(w);
    return b;
  endfunction

  function automatic real f_at(input logic [31:1] t, input longint w, input int hi,
                               input bin_arr_t bw);
    return dco_model_pkg::freq(t, fine_code(w, hi, bw));
  endfunction

  // weight in [0, wmax] (extrapolated by one step at the top) whose frequency is f_t;
  // the frequency falls as the weight grows
  function automatic longint search(input logic [31:1] t, input real f_t, input int hi,
                                    input longint wmax, input bin_arr_t bw);
    longint lo, h, mid;
    real f0, f1;
    lo = 0;
    h  = wmax;
    while (lo < h) begin           // largest w with f(w) >= f_t
      mid = (lo + h + 1) / 2;
      if (f_at(t, mid, hi, bw) >= f_t) lo = mid;
      else                             h  = mid - 1;
    end
    if (lo == wmax) lo = wmax - 1; // the step between wmax-1 and wmax extends the range
    f0 = f_at(t, lo, hi, bw);
    f1 = f_at(t, lo + 1, hi, bw);
    return lo + longint'((f0 - f_t) / (f0 - f1));
  endfunction

  function automatic void calibrate(output th_arr_t th, output bin_arr_t bw);
    longint span;
    logic [31:1] t;
    for (int j = 5; j <= 15; j++) bw[j] = 0;
    span = 31;
    for (int j = 5; j <= 15; j++) begin
      bw[j] = search('0, dco_model_pkg::freq('0, 16'(1) << j), j, span, bw);
      span += bw[j];
    end
    t = '0;
    for (int i = 1; i <= 31; i++) begin
      th[i] = ((i == 1) ? 0 : th[i-1])
              + search(t, dco_model_pkg::freq(t | (31'(1) << (i - 1)), '0), 16, span, bw);
      t[i] = 1'b1;
    end
  endfunction

endpackage
