// tb_fmcw_closed_loop: closed-loop test of the FMCW PLL digital core (two-point modulation).
//
// The analog side is modelled per reference period T = 10 ns:
//   * DCO: dco_model_pkg frequency of the bank controls present in the period; the phase of
//     the divide-by-2 output advances by f_DCO/2 * T cycles per period.
//   * divider + DTC + sampling phase detector: the divider has consumed the sum of the
//     ratios n_div of all periods so far, and the DTC shifts the reference by dtc_code/1024
//     of a divided cycle; the phase detector output is
//         e_k = round(G * (phase_DCO - (sum n_div + dtc_code/1024))),  G = 256 per cycle,
//     clipped to the 10-bit range, and enters the core one reference period later.
// With a correct DSM and DTC code the fractional part of the ratio cancels, so e_k only
// shows real frequency error. The test:
//   1. calibrates the DPD (8th order) as in the open-loop testbench;
//   2. adds an offset of 3000 fine LSBs to a0 (a drift of about 5 MHz) and closes the loop at
//      Fcw = 43.25 (fractional ratio, 8.65 GHz): the phase error must settle near zero, the
//      average DCO frequency must match 8.65 GHz within 20 kHz, and the loop filter must carry
//      about -3000;
//   3. runs 10 GHz/us sawtooth chirps with the same offset, open loop (integrator held at its
//      settled value) and closed loop, and requires both rms errors below 0.039% of the
//      bandwidth, compared with the open-loop error without the stored correction; while the
//      loop tracks the chirp, the phase error must stay below 0.05 cycle (both modulation
//      points aligned).
`timescale 1ps / 1fs
module tb_fmcw_closed_loop;
  import fmcw_pkg::*;

  localparam int  LAT   = 12;
  localparam real F_REF = 100.0e6;
  localparam real T_REF = 10.0e-9;
  localparam real NC    = 43.25;
  localparam real G_PD  = 256.0;

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
  logic [3:0] kp_shift = 4'd6, ki_shift = 4'd6;
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

  always #5000 clk = ~clk;
  always #100 clk_div2 = ~clk_div2;   // the divider's counting is modelled by sum n_div

  initial begin
    #(1_000_000_000);   // 100000 reference cycles
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- phase bookkeeping, evaluated just before each reference edge ---------------------
  real    phase_dco = 0.0;      // divide-by-2 cycles
  longint ratio_sum = 0;
  real    pe = 0.0;             // last phase error, cycles
  real    f_now = 0.0;
  bit     track = 1'b0;         // loop model running
  always @(posedge clk) begin
    if (track) begin
      // the period that ends now used the controls and ratio that were present during it
      pe = phase_dco - (real'(ratio_sum) + real'(dtc_code) / 1024.0);
      e_k <= E_W'((G_PD * pe > 511.0) ? 511 : (G_PD * pe < -512.0) ? -512 : int'(G_PD * pe));
    end
  end
  always @(negedge clk) begin
    if (track) begin
      f_now = dco_model_pkg::freq(d_ctrlt, d_ctrlb);
      phase_dco += f_now / 2.0 * T_REF;
      ratio_sum += longint'(n_div);
    end
  end

  fcw_t hist [$];
  always @(negedge clk) begin
    hist.push_back(fcw);
    if (hist.size() > 64) void'(hist.pop_front());
  end

  real sx [$];
  real sy [$];
  real a [POLY_ORD+1];

  task automatic calibrate();
    longint top;
    sx.delete(); sy.delete();
    top = longint'(th[N_COARSE]) + 60000;
    mode = CHIRP_CW;
    for (int k = 0; k <= 40; k++) begin
      for (int i = 0; i <= POLY_ORD; i++) coef[i] = '0;
      coef[0] = coef_t'((top * k / 40) * 65536);
      repeat (LAT + 2) @(posedge clk);
      #1;
      sx.push_back((dco_model_pkg::freq(d_ctrlt, d_ctrlb) / (2.0 * F_REF) - NC) / 8.0);
      sy.push_back(real'(top * k / 40));
    end
  endtask

  // Start phase tracking from the present state: phase error zero
  task automatic start_tracking();
    @(posedge clk); #1;
    phase_dco = 0.0; ratio_sum = 0; track = 1'b1;
    // align: count the ratio and the DTC state already present
    phase_dco = real'(dtc_code) / 1024.0;
  endtask

  real pe_chirp;   // largest |phase error| during the last chirp while tracking

  task automatic run_chirp(output real rms, output real bw);
    real f, fi, e, s;
    int n;
    pe_chirp = 0.0;
    @(negedge clk) begin mode = CHIRP_SAW; fcw_start = DEF_FCW_START; restart = 1'b1; end
    @(negedge clk) restart = 1'b0;
    repeat (LAT + 4) @(posedge clk);
    s = 0.0; n = 5 * (DEF_N_RAMP + DEF_N_IDLE);
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      f  = dco_model_pkg::freq(d_ctrlt, d_ctrlb);
      fi = 2.0 * F_REF * real'(hist[hist.size() - LAT]) / 65536.0;
      e  = f - fi;
      s += e * e;
      if (track && (pe < 0 ? -pe : pe) > pe_chirp) pe_chirp = (pe < 0 ? -pe : pe);
    end
    rms = $sqrt(s / n);
    bw  = 2.0 * F_REF * real'(DEF_N_RAMP * DEF_FCW_STEP) / 65536.0;
  endtask

  initial begin
    real rms_open, rms_stored, rms_closed, bw, fsum, pe_max;
    longint y_settled;
    int n;
    dco_model_pkg::init(30);
    begin   // overlap calibration by binary search (checked in tb_fmcw_pll_top)
      overlap_cal_pkg::th_arr_t  th_m;
      overlap_cal_pkg::bin_arr_t bin_m;
      overlap_cal_pkg::calibrate(th_m, bin_m);
      for (int i = 1; i <= N_COARSE; i++) th[i] = tw_t'(th_m[i]);
      for (int j = N_RESID; j < N_FINE; j++) bin[j] = tw_t'(bin_m[j]);
    end
    fcw_start = DEF_FCW_START; fcw_step = DEF_FCW_STEP;
    fcw_center = fcw_t'(int'(NC * 65536.0));
    n_ramp = 16'(DEF_N_RAMP); n_idle = 16'(DEF_N_IDLE);
    for (int i = 0; i <= POLY_ORD; i++) coef[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    calibrate();
    dpd_fit_pkg::fit(sx, sy, 8, a);
    a[0] += 3000.0;   // drift after calibration
    for (int i = 0; i <= POLY_ORD; i++) coef[i] = coef_t'(longint'(a[i] * 65536.0));

    // open loop chirp with the drift and no correction
    run_chirp(rms_open, bw);
    $display("chirp, drift, loop open:            rms %0.1f kHz (%0.5f%%)", rms_open / 1e3, 100.0 * rms_open / bw);

    // close the loop at Fcw = 43.25
    @(negedge clk) begin
      mode = CHIRP_CW; fcw_start = fcw_t'(int'(NC * 65536.0)); restart = 1'b1;
    end
    @(negedge clk) begin restart = 1'b0; loop_clear = 1'b0; end
    repeat (LAT + 4) @(posedge clk);
    start_tracking();
    @(negedge clk) loop_hold = 1'b0;
    repeat (3000) @(posedge clk);
    // settled: phase error small, average frequency on target
    fsum = 0.0; pe_max = 0.0;
    for (int k = 0; k < 1000; k++) begin
      @(posedge clk); #1;
      fsum += f_now;
      if ((pe < 0 ? -pe : pe) > pe_max) pe_max = (pe < 0 ? -pe : pe);
    end
    y_settled = longint'(dut.dlf_y);
    $display("settled: max phase error %0.4f cycles, mean frequency error %0.2f kHz, loop filter %0d",
             pe_max, (fsum / 1000.0 - 2.0 * F_REF * NC) / 1e3, y_settled);
    check(pe_max < 0.05, "phase error settled below 0.05 cycle with a fractional ratio");
    check((fsum / 1000.0 - 2.0 * F_REF * NC) < 20e3 && (fsum / 1000.0 - 2.0 * F_REF * NC) > -20e3,
          "mean frequency within 20 kHz");
    check(y_settled < -2800 && y_settled > -3200, "loop filter holds the drift correction");

    // closed-loop chirp: the divider path follows the same words
    run_chirp(rms_closed, bw);
    $display("chirp, drift, loop closed:          rms %0.1f kHz (%0.5f%%), max |e_k| after chirp %0d",
             rms_closed / 1e3, 100.0 * rms_closed / bw, e_k);
    $display("  largest phase error during the closed-loop chirps: %0.4f cycles", pe_chirp);
    check(pe_chirp < 0.05, "both modulation points aligned: phase error stays below 0.05 cycle");
    check(rms_closed / bw < 0.00039, "closed-loop chirp below 0.039% of the bandwidth");
    check(rms_closed < rms_open / 5.0, "closed loop removes the drift");

    // hold the integrator: the stored correction stays
    @(negedge clk) loop_hold = 1'b1;
    track = 1'b0;
    @(negedge clk) e_k = '0;
    run_chirp(rms_stored, bw);
    $display("chirp, drift, correction held:      rms %0.1f kHz (%0.5f%%)", rms_stored / 1e3, 100.0 * rms_stored / bw);
    check(rms_stored / bw < 0.00039, "held correction keeps the chirp below 0.039%");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
