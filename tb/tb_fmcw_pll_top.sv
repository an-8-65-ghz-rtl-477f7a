// tb_fmcw_pll_top: end-to-end testbench of the FMCW PLL digital core at its default sizes.
//
// The DCO is replaced by a frequency model (dco_model_pkg, square-root tuning law, 3%
// mismatched cells) whose divided-by-2 clock drives the divider. The test then runs, with
// the loop open (e_k = 0), what the chip's setup would run:
//   1. overlap calibration: TH/BIN found by binary search on the model's frequencies
//      (overlap_cal_pkg) and compared with the model's true weights;
//   2. polynomial calibration: tw swept over 41 evenly spaced points with a constant-only
//      polynomial, the DCO frequency measured, and an 8th- (and a 2nd-) order least-squares
//      fit of tw against the normalised frequency x = (f/200 MHz - 43.25)/8;
//   3. 10 GHz/us, 3 GHz sawtooth chirps (50 ns idle) and triangular chirps; the model
//      frequency is compared with 2*100 MHz*Fcw of 12 clocks earlier (pipeline latency) and
//      the rms frequency error must be below 0.039% of the chirp bandwidth for the 8th-order
//      DPD, and larger with the 2nd-order one;
//   4. fractional-N setting Fcw = 50 + 2^-14: the divider must deliver one pulse per
//      reference cycle on average and the ratios must average to Fcw;
//   5. the loop filter path: a constant e_k must shift tw_total by the PI filter output.
// In every cycle the bank controls must rebuild the tuning word of two cycles earlier
// (TH[D_M] + sum of BIN[j] + residue) to within 2 LSB.
// Each mechanism (sawtooth ramps, idle time, triangle turns, constant mode, coarse code
// changes, DSM carries, divider pulses, loop-filter action, DPD-order effect, pre-charge
// pulses) is counted, and a failure is counted for any that never happened.
`timescale 1ps / 1fs
module tb_fmcw_pll_top;
  import fmcw_pkg::*;

  localparam int  LAT   = 12;          // Fcw -> DCO controls
  localparam real F_REF = 100.0e6;
  localparam real NC    = 43.25;       // centre 8.65 GHz

  logic clk = 1'b0, rst_n = 1'b0, clk_div2 = 1'b0;
  logic restart = 1'b0;
  chirp_mode_e mode = CHIRP_CW;
  fcw_t fcw_start, fcw_step, fcw_center;
  logic [15:0] n_ramp, n_idle;
  coef_t coef [POLY_ORD+1];
  tw_t th [1:N_COARSE];
  tw_t bin [N_RESID:N_FINE-1];
  logic signed [E_W-1:0] e_k = '0;
  logic loop_hold = 1'b1, loop_clear = 1'b1;
  logic [3:0] kp_shift = 4'd2, ki_shift = 4'd0;
  logic [N_COARSE:1] d_ctrlt;
  logic [N_FINE-1:0] d_ctrlb;
  logic [4:0] d_m;
  logic [N_COARSE:1] sw1_coarse;
  logic [5:0] sw1_fine;
  logic [DTC_W-1:0] dtc_code;
  logic [FCW_INT:0] n_div;
  logic div_out;
  fcw_t fcw;
  tw_t tw_total;
  logic ramp_up, ramp_start, ramp_turn, chirp_idle, dsm_carry, tw_clipped, resid_over, dlf_sat;

  fmcw_pll_top dut (.*);

  int checks = 0, failures = 0;

  always #5000 clk = ~clk;   // 100 MHz reference

  // DCO model, followed by the divide-by-2: half period of clk_div2 = one DCO period
  realtime t_half;
  always begin
    t_half = 1.0e12 / dco_model_pkg::freq(d_ctrlt, d_ctrlb);
    #(t_half) clk_div2 = ~clk_div2;
  end

  initial begin
    #(30_000_000);   // 3000 reference cycles
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- mechanism counters --------------------------------------------------------------
  int n_saw_ramps = 0, n_tri_turns = 0, n_idle_cyc = 0, n_cw_cyc = 0, n_coarse = 0;
  int n_carry = 0, n_div_pulses = 0, n_dlf = 0, n_order = 0, n_resid_over = 0;
  int n_pchg = 0;
  bit in_8th = 1'b0;   // an 8th-order chirp is being measured
  logic [4:0] dm_last = '0;
  always @(posedge clk) if (rst_n) begin
    if (ramp_start && mode == CHIRP_SAW) n_saw_ramps++;
    if (ramp_turn && mode == CHIRP_TRI)  n_tri_turns++;
    if (chirp_idle && mode == CHIRP_SAW) n_idle_cyc++;
    if (mode == CHIRP_CW)                n_cw_cyc++;
    if (d_m != dm_last)                  n_coarse++;
    if (dsm_carry)                       n_carry++;
    if (resid_over && in_8th)            n_resid_over++;
    dm_last <= d_m;
  end
  always @(posedge div_out) n_div_pulses++;
  // overlap correction: TH[D_M] + sum BIN[j]*D_CTRLB[j] + D_CTRLB[4:0] must rebuild the tuning
  // word of two cycles earlier to within 2 LSB. Weights that leave the cascade no spare range
  // can open gaps of a few LSB, which the clipped residue absorbs and flags with resid_over;
  // with the calibrated weights of this model the rebuild is exact.
  tw_t tw_h1 = '0, tw_h2 = '0;
  int  n_rebuild = 0, max_gap = 0;
  always @(negedge clk) begin
    if (rst_n && n_rebuild < 1000000) begin
      longint rb, gap;
      rb = (d_m == 0) ? 0 : longint'(th[d_m]);
      for (int j = N_RESID; j < N_FINE; j++) if (d_ctrlb[j]) rb += longint'(bin[j]);
      rb += longint'(d_ctrlb[N_RESID-1:0]);
      gap = longint'(tw_h2) - rb;
      n_rebuild++;
      if (n_rebuild > 3) begin
        if (gap > max_gap) max_gap = int'(gap);
        check(gap >= 0 && gap <= 2, $sformatf("overlap rebuild: tw %0d rebuilt %0d", tw_h2, rb));
      end
    end
    tw_h2 = tw_h1;
    tw_h1 = tw_total;
  end
  // every pre-charge pulse must follow a coarse cell or one of D_CTRLB[15:10] switching off
  logic [N_COARSE+5:0] ctl_prev = '0;
  always @(posedge clk) ctl_prev <= {d_ctrlb[15:10], d_ctrlt};
  always @(posedge (|{sw1_fine, sw1_coarse})) if (rst_n) begin
    n_pchg++;
    check(({sw1_fine, sw1_coarse} & ~(ctl_prev & ~{d_ctrlb[15:10], d_ctrlt})) == '0,
          "pre-charge pulse only on cells that switched off");
  end

  // Fcw history for the latency-aligned comparison
  fcw_t hist [$];
  always @(negedge clk) begin
    hist.push_back(fcw);
    if (hist.size() > 64) void'(hist.pop_front());
  end
  // Fcw that entered the core n clock edges before the last one (n = 0: the word sampled by
  // the last edge); a 12-register path shows after edge E the word sampled at edge E-11
  function automatic fcw_t fcw_ago(input int n);
    return hist[hist.size() - 1 - n];
  endfunction

  function automatic real fcw_real(input fcw_t f);
    return real'(f) / 65536.0;
  endfunction

  // ---- calibration points --------------------------------------------------------------
  real sx [$];
  real sy [$];

  task automatic load_coefs(input real a [POLY_ORD+1]);
    for (int i = 0; i <= POLY_ORD; i++) coef[i] = coef_t'(longint'(a[i] * 65536.0));
  endtask

  task automatic calibrate_poly();
    longint top;
    real f;
    sx.delete(); sy.delete();
    top = longint'(th[N_COARSE]) + 60000;
    mode = CHIRP_CW;
    for (int k = 0; k <= 40; k++) begin
      for (int i = 0; i <= POLY_ORD; i++) coef[i] = '0;
      coef[0] = coef_t'((top * k / 40) * 65536);
      repeat (LAT + 2) @(posedge clk);
      #1;
      f = dco_model_pkg::freq(d_ctrlt, d_ctrlb);
      sx.push_back((f / (2.0 * F_REF) - NC) / 8.0);
      sy.push_back(real'(top * k / 40));
    end
  endtask

  // run n cycles of the present mode; returns the rms error (Hz) over samples where the
  // compared Fcw is inside the chirp (ramps and idle alike)
  task automatic measure(input int n, output real rms, output real peak);
    real f, fi, e, s;
    int cnt;
    s = 0.0; cnt = 0; peak = 0.0;
    repeat (LAT + 4) @(posedge clk);
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      f  = dco_model_pkg::freq(d_ctrlt, d_ctrlb);
      fi = 2.0 * F_REF * fcw_real(fcw_ago(LAT - 1));
      e  = f - fi;
      s += e * e; cnt++;
      if ((e < 0 ? -e : e) > peak) peak = (e < 0 ? -e : e);
      // divider path is aligned with the DCO path
      check(n_div == 7'(int'(fcw_ago(LAT - 1)) >> FCW_FRAC) || n_div == 7'((int'(fcw_ago(LAT - 1)) >> FCW_FRAC) + 1),
            $sformatf("n_div %0d aligned with Fcw %f", n_div, fcw_real(fcw_ago(LAT - 1))));
    end
    rms = $sqrt(s / cnt);
  endtask

  real a8 [POLY_ORD+1];
  real a2 [POLY_ORD+1];

  initial begin
    real rms8, rms2, rmst, pk, bw;
    int pulses0, cyc;
    longint nsum;
    dco_model_pkg::init(30);
    // 1. overlap calibration by binary search on the model's frequencies. The fine weights
    //    must match the model's true ones (in residue-LSB units) within 2 units, and the
    //    calibrated tuning curve must have no jump at any coarse boundary: going from weight
    //    TH[i]-1 (i-1 cells + fine) to TH[i] (i cells, fine empty) must change the frequency
    //    by one ordinary fine step, within +-2 steps.
    begin
      overlap_cal_pkg::th_arr_t  th_m;
      overlap_cal_pkg::bin_arr_t bin_m;
      logic [31:1] tp;
      real dev, f_a, f_b, f_c, step, jump, max_jump;
      overlap_cal_pkg::calibrate(th_m, bin_m);
      for (int j = N_RESID; j < N_FINE; j++) begin
        bin[j] = tw_t'(bin_m[j]);
        dev = real'(bin_m[j]) - dco_model_pkg::cf[j] / dco_model_pkg::cf[0];
        check(dev <= 2.0 && dev >= -2.0, $sformatf("calibrated BIN[%0d] = %0d", j, bin_m[j]));
      end
      tp = '0;
      max_jump = 0.0;
      for (int i = 1; i <= N_COARSE; i++) begin
        longint w;
        th[i] = tw_t'(th_m[i]);
        w   = th_m[i] - ((i == 1) ? 0 : th_m[i-1]);
        f_c = dco_model_pkg::freq(tp, overlap_cal_pkg::fine_code(w - 2, 16, bin_m));
        f_a = dco_model_pkg::freq(tp, overlap_cal_pkg::fine_code(w - 1, 16, bin_m));
        tp[i] = 1'b1;
        f_b = dco_model_pkg::freq(tp, '0);
        step = f_c - f_a;
        jump = (f_a - f_b) / step;
        if (jump - 1.0 > max_jump)  max_jump = jump - 1.0;
        if (1.0 - jump > max_jump)  max_jump = 1.0 - jump;
        check(jump >= -1.0 && jump <= 3.0,
              $sformatf("coarse boundary %0d: step of %0.2f fine steps", i, jump));
      end
      $display("overlap calibration: TH[31] = %0d, BIN[15] = %0d, coarse boundaries within %0.2f fine steps of an ordinary step",
               th[N_COARSE], bin[N_FINE-1], max_jump);
    end
    fcw_start  = DEF_FCW_START;
    fcw_step   = DEF_FCW_STEP;
    fcw_center = fcw_t'(int'(NC * 65536.0));
    n_ramp     = 16'(DEF_N_RAMP);
    n_idle     = 16'(DEF_N_IDLE);
    for (int i = 0; i <= POLY_ORD; i++) coef[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) loop_clear = 1'b0;

    // 2. polynomial calibration
    calibrate_poly();
    dpd_fit_pkg::fit(sx, sy, 8, a8);
    dpd_fit_pkg::fit(sx, sy, 2, a2);
    for (int i = 0; i <= POLY_ORD; i++) $display("fitted a[%0d]: 8th order %f, 2nd order %f", i, a8[i], a2[i]);

    // 3a. sawtooth, 8th order
    load_coefs(a8);
    bw = 2.0 * F_REF * fcw_real(fcw_t'(DEF_N_RAMP * DEF_FCW_STEP));
    @(negedge clk) begin mode = CHIRP_SAW; restart = 1'b1; end
    @(negedge clk) restart = 1'b0;
    in_8th = 1'b1;
    measure(5 * (DEF_N_RAMP + DEF_N_IDLE), rms8, pk);
    in_8th = 1'b0;
    $display("sawtooth 8th order: rms error %0.1f kHz (%0.4f%% of %0.2f GHz), peak %0.1f kHz",
             rms8 / 1e3, 100.0 * rms8 / bw, bw / 1e9, pk / 1e3);
    check(rms8 / bw < 0.00039, "8th-order sawtooth rms error below 0.039% of the bandwidth");

    // 3b. sawtooth, 2nd order
    load_coefs(a2);
    @(negedge clk) begin restart = 1'b1; end
    @(negedge clk) restart = 1'b0;
    measure(5 * (DEF_N_RAMP + DEF_N_IDLE), rms2, pk);
    $display("sawtooth 2nd order: rms error %0.1f kHz (%0.4f%%)", rms2 / 1e3, 100.0 * rms2 / bw);
    check(rms2 > 2.0 * rms8, "2nd-order DPD leaves a larger error than 8th-order");
    if (rms2 > 2.0 * rms8) n_order++;

    // 3c. triangle, 8th order
    load_coefs(a8);
    @(negedge clk) begin mode = CHIRP_TRI; restart = 1'b1; end
    @(negedge clk) restart = 1'b0;
    in_8th = 1'b1;
    measure(4 * 2 * DEF_N_RAMP, rmst, pk);
    in_8th = 1'b0;
    $display("triangle 8th order: rms error %0.1f kHz (%0.4f%%)", rmst / 1e3, 100.0 * rmst / bw);
    check(rmst / bw < 0.00039, "8th-order triangle rms error below 0.039% of the bandwidth");

    // 4. fractional-N: Fcw = 50 + 2^-14 (10.0000012 GHz)
    @(negedge clk) begin
      mode = CHIRP_CW; fcw_start = fcw_t'(50 * 65536 + 4); restart = 1'b1;
    end
    @(negedge clk) restart = 1'b0;
    repeat (LAT + 20) @(posedge clk);
    pulses0 = n_div_pulses; nsum = 0;
    for (cyc = 0; cyc < 1024; cyc++) begin
      @(posedge clk); #1;
      nsum += longint'(n_div);
    end
    check(nsum == 50 * 1024 || nsum == 50 * 1024 + 1, $sformatf("ratio sum %0d", nsum));
    check((n_div_pulses - pulses0) >= 1022 && (n_div_pulses - pulses0) <= 1026,
          $sformatf("divider pulses %0d in 1024 reference cycles", n_div_pulses - pulses0));

    // 5. loop filter: e_k = 5, kp = 2^2, ki = 2^0, integrator from zero
    begin
      tw_t base;
      longint integ, yexp;
      @(negedge clk) loop_clear = 1'b1;
      @(negedge clk) begin loop_clear = 1'b0; base = tw_total; end
      @(negedge clk) begin loop_hold = 1'b0; e_k = 10'sd5; end
      integ = 0;
      for (int k = 0; k < 40; k++) begin
        @(posedge clk); #1;
        yexp = 20 + integ / 256;
        check(longint'(tw_total) - longint'(base) == yexp,
              $sformatf("tw_total shift %0d exp %0d", longint'(tw_total) - longint'(base), yexp));
        if (tw_total != base) n_dlf++;
        integ += 5;
      end
      @(negedge clk) begin e_k = '0; loop_hold = 1'b1; loop_clear = 1'b1; end
    end

    // mechanisms
    $display("mechanisms: saw ramps %0d, idle cycles %0d, triangle turns %0d, constant cycles %0d,",
             n_saw_ramps, n_idle_cyc, n_tri_turns, n_cw_cyc);
    $display("  coarse code changes %0d, DSM carries %0d, divider pulses %0d, loop filter %0d, order %0d, pre-charge %0d",
             n_coarse, n_carry, n_div_pulses, n_dlf, n_order, n_pchg);
    check(n_saw_ramps > 0, "sawtooth ramps happened");
    check(n_idle_cyc > 0, "idle time happened");
    check(n_tri_turns > 0, "triangle turns happened");
    check(n_cw_cyc > 0, "constant mode happened");
    check(n_coarse > 0, "coarse code changes happened");
    check(n_carry > 0, "DSM carries happened");
    check(n_div_pulses > 0, "divider pulses happened");
    check(n_dlf > 0, "loop filter acted");
    check(n_order > 0, "DPD order comparison happened");
    check(n_pchg > 0, "pre-charge pulses happened");
    $display("overlap rebuild checked in %0d cycles, largest gap %0d LSB, residue clipped in %0d 8th-order chirp cycles",
             n_rebuild, max_gap, n_resid_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
