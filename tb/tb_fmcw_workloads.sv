// tb_fmcw_workloads: the evaluation sweeps of the FMCW PLL, run on the digital core with a
// DCO frequency model (dco_model_pkg) and the loop open.
//   * DPD order 2..8 at the maximum slope (10 GHz/us, 3 GHz, sawtooth with 50 ns idle and
//     triangle): the rms frequency error of each order is reported; the 8th order must stay
//     below 0.039% of the chirp bandwidth and must beat the 2nd order by more than 5x.
//   * Chirp slope 0.1, 1 and 10 GHz/us (triangle, 3 GHz, 8th order): the rms error must stay
//     below 0.039% of the bandwidth at every slope.
//   * The measured sawtooth of the reference design: a down-chirp at -10 GHz/us, 3.1 GHz in
//     310 ns with 50 ns idle, here from 10.2 to 7.1 GHz (negative fcw_step), 8th order.
// The model has no settling dynamics, so the errors here are the static residue of the
// polynomial fit and of the capacitor quantisation, not a prediction of measured errors.
`timescale 1ps / 1fs
module tb_fmcw_workloads;
  import fmcw_pkg::*;

  localparam int  LAT   = 12;
  localparam real F_REF = 100.0e6;
  localparam real NC    = 43.25;

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
  logic [3:0] kp_shift = 4'd0, ki_shift = 4'd0;
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
  always #100 clk_div2 = ~clk_div2;   // the divider is not observed here

  initial begin
    #(2_000_000_000);   // 200000 reference cycles
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

  task automatic use_order(input int order);
    dpd_fit_pkg::fit(sx, sy, order, a);
    for (int i = 0; i <= POLY_ORD; i++) coef[i] = coef_t'(longint'(a[i] * 65536.0));
  endtask

  task automatic run_chirp(input chirp_mode_e m, input int step, input int nr, input int ncyc,
                           output real rms, output real bw, input int start = DEF_FCW_START);
    real f, fi, e, s;
    @(negedge clk) begin
      mode = m; fcw_start = fcw_t'(start); fcw_step = fcw_t'(step); n_ramp = 16'(nr); n_idle = 16'(DEF_N_IDLE);
      restart = 1'b1;
    end
    @(negedge clk) restart = 1'b0;
    repeat (LAT + 4) @(posedge clk);
    s = 0.0;
    for (int k = 0; k < ncyc; k++) begin
      @(posedge clk); #1;
      f  = dco_model_pkg::freq(d_ctrlt, d_ctrlb);
      fi = 2.0 * F_REF * real'(hist[hist.size() - LAT]) / 65536.0;
      e  = f - fi;
      s += e * e;
    end
    rms = $sqrt(s / ncyc);
    bw  = 2.0 * F_REF * real'(nr * (step < 0 ? -step : step)) / 65536.0;
  endtask

  initial begin
    real rs [2:8];
    real rt [2:8];
    real bw, r;
    int step;
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

    // DPD order sweep at 10 GHz/us, 3 GHz
    for (int o = 2; o <= 8; o++) begin
      use_order(o);
      run_chirp(CHIRP_SAW, DEF_FCW_STEP, DEF_N_RAMP, 5 * (DEF_N_RAMP + DEF_N_IDLE), rs[o], bw);
      run_chirp(CHIRP_TRI, DEF_FCW_STEP, DEF_N_RAMP, 5 * 2 * DEF_N_RAMP, rt[o], bw);
      $display("order %0d: sawtooth rms %9.1f kHz (%0.5f%%), triangle rms %9.1f kHz (%0.5f%%)",
               o, rs[o] / 1e3, 100.0 * rs[o] / bw, rt[o] / 1e3, 100.0 * rt[o] / bw);
    end
    check(rs[8] / bw < 0.00039, "8th-order sawtooth below 0.039%");
    check(rt[8] / bw < 0.00039, "8th-order triangle below 0.039%");
    check(rs[8] * 5.0 < rs[2], "sawtooth: 8th order beats 2nd order by more than 5x");
    check(rt[8] * 5.0 < rt[2], "triangle: 8th order beats 2nd order by more than 5x");

    // slope sweep, triangle, 8th order, 3 GHz
    use_order(8);
    for (int sidx = 0; sidx < 3; sidx++) begin
      real slope;   // GHz/us
      int nr;
      slope = (sidx == 0) ? 0.1 : (sidx == 1) ? 1.0 : 10.0;
      step  = int'(slope * 1e15 * 10e-9 / (2.0 * F_REF) * 65536.0);
      nr    = int'(3.0e9 / (slope * 1e15 * 10e-9));
      run_chirp(CHIRP_TRI, step, nr, 2 * nr, r, bw);
      $display("slope %5.2f GHz/us (step %0d, %0d cycles per ramp, %0.3f GHz): rms %0.1f kHz (%0.5f%%)",
               slope, step, nr, bw / 1e9, r / 1e3, 100.0 * r / bw);
      check(r / bw < 0.00039, $sformatf("slope %0.2f GHz/us below 0.039%%", slope));
    end
    // down-chirp sawtooth: 10.2 GHz (Fcw 51) falling 0.5 per cycle for 31 cycles, 50 ns idle
    run_chirp(CHIRP_SAW, -int'(DEF_FCW_STEP), 31, 5 * (31 + DEF_N_IDLE), r, bw, 51 * 65536);
    $display("down-chirp -10 GHz/us, %0.2f GHz in 310 ns: rms %0.1f kHz (%0.5f%%)",
             bw / 1e9, r / 1e3, 100.0 * r / bw);
    check(r / bw < 0.00039, "down-chirp 3.1 GHz below 0.039%");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
