// fmcw_pll_top: digital core of a two-point-modulation FMCW PLL with 8th-order polynomial
// DPD and flash-quantizer overlap correction.
//
// One frequency control word Fcw per reference cycle (100 MHz) comes from chirp_gen and is
// applied at two points of the PLL:
//   * DCO path: dpd_poly8 predistorts Fcw into the tuning word tw, the loop-filter output is
//     added, and overlap_corr splits the sum into the thermometer coarse-bank control
//     D_CTRLT[31:1] and the binary fine-bank control D_CTRLB[15:0] of the DCO.
//   * Divider path: Fcw, delayed to line up with the DCO path, goes to the delta-sigma
//     modulator, whose integer ratios drive the multi-modulus divider and whose phase
//     residue drives the DTC code.
// The sampling phase detector, the DTC, the DCO, the divide-by-2 and the reference buffer
// are analog and outside this module: the DCO bank controls and the DTC code leave as
// ports, the digitised phase error e_k and the divide-by-2 clock clk_div2 enter as ports.
// The pre-charge delay line of the fast-charging switched capacitors sits on the bank
// controls: it is a behavioural (delay-based) model of an analog circuit, instantiated here
// so that its pulses sw1_coarse / sw1_fine leave the core with the bank controls. DPD coefficients and the TH/BIN overlap weights are inputs:
// they come from foreground calibrations run in software.
//
// Following the document: the chirp shapes, the two modulation points, the 8th-order
// polynomial, the flash + cascaded quantizer structure. This design's choices: the word
// formats (fmcw_pkg), tw_total = clip(tw_dpd + dlf), the alignment delay ALIGN_DLY on the
// divider path, a first-order DSM and the loop-filter form.
//
// Timing (clk): D_CTRLT/D_CTRLB follow fcw by 12 clocks (10 DPD + 2 overlap correction);
// n_div follows fcw by ALIGN_DLY + 1 clocks (12 with the default), so both modulation
// points see the same Fcw in the same cycle.
module fmcw_pll_top
  import fmcw_pkg::*;
#(
  parameter int unsigned CNT_W     = 16,
  parameter int unsigned ALIGN_DLY = 11
) (
  input  logic                     clk,          // reference-rate digital clock
  input  logic                     rst_n,
  input  logic                     clk_div2,     // DCO clock after divide-by-2
  // chirp settings
  input  logic                     restart,
  input  chirp_mode_e              mode,
  input  fcw_t                     fcw_start,
  input  fcw_t                     fcw_step,
  input  logic [CNT_W-1:0]         n_ramp,
  input  logic [CNT_W-1:0]         n_idle,
  // calibration results
  input  fcw_t                     fcw_center,
  input  coef_t                    coef [POLY_ORD+1],
  input  tw_t                      th   [1:N_COARSE],
  input  tw_t                      bin  [N_RESID:N_FINE-1],
  // loop
  input  logic signed [E_W-1:0]    e_k,
  input  logic                     loop_hold,
  input  logic                     loop_clear,
  input  logic [3:0]               kp_shift,
  input  logic [3:0]               ki_shift,
  // to the DCO
  output logic [N_COARSE:1]        d_ctrlt,
  output logic [N_FINE-1:0]        d_ctrlb,
  output logic [4:0]               d_m,
  output logic [N_COARSE:1]        sw1_coarse,   // pre-charge pulses, coarse cells
  output logic [5:0]               sw1_fine,     // pre-charge pulses, D_CTRLB[15:10]
  // to the DTC and from the divider
  output logic [DTC_W-1:0]         dtc_code,
  output logic [FCW_INT:0]         n_div,
  output logic                     div_out,
  // observation
  output fcw_t                     fcw,
  output tw_t                      tw_total,
  output logic                     ramp_up,
  output logic                     ramp_start,
  output logic                     ramp_turn,
  output logic                     chirp_idle,
  output logic                     dsm_carry,
  output logic                     tw_clipped,
  output logic                     resid_over,
  output logic                     dlf_sat
);

  // ---- chirp generator -------------------------------------------------------------------
  chirp_gen #(.CNT_W(CNT_W)) u_chirp (
    .clk, .rst_n, .restart, .mode, .fcw_start, .fcw_step, .n_ramp, .n_idle,
    .fcw, .ramp_up, .ramp_start, .turn(ramp_turn), .idle(chirp_idle)
  );

  // ---- DCO path: DPD, loop-filter sum, overlap correction -------------------------------
  tw_t  tw_dpd;
  logic dpd_clip;
  dpd_poly8 u_dpd (
    .clk, .rst_n, .fcw, .fcw_center, .coef, .tw(tw_dpd), .tw_clipped(dpd_clip)
  );

  logic signed [DLF_W-1:0] dlf_y;
  dlf u_dlf (
    .clk, .rst_n, .clear(loop_clear), .hold(loop_hold), .e(e_k),
    .kp_shift, .ki_shift, .y(dlf_y), .sat(dlf_sat)
  );

  logic signed [TW_W+1:0] tw_sum;
  logic                   sum_clip;
  always_comb begin
    tw_sum   = $signed({2'b00, tw_dpd}) + (TW_W+2)'(dlf_y);
    sum_clip = 1'b0;
    if (tw_sum < 0) begin
      tw_total = '0;
      sum_clip = 1'b1;
    end else if (tw_sum > $signed({2'b00, {TW_W{1'b1}}})) begin
      tw_total = '1;
      sum_clip = 1'b1;
    end else begin
      tw_total = tw_t'(tw_sum);
    end
  end
  assign tw_clipped = dpd_clip | sum_clip;

  overlap_corr u_ovl (
    .clk, .rst_n, .tw(tw_total), .th, .bin, .d_ctrlt, .d_m, .d_ctrlb, .resid_over
  );

  // ---- pre-charge pulses for the fast-charging cells (behavioural model) ----------------
  logic [N_COARSE+5:0] sw_fast, sw1_fast;
  assign sw_fast = {d_ctrlb[N_FINE-1 -: 6], d_ctrlt};
  precharge_delay_line #(.N_CH(N_COARSE + 6)) u_pchg (.sw(sw_fast), .sw1(sw1_fast));
  assign sw1_coarse = sw1_fast[N_COARSE-1:0];
  assign sw1_fine   = sw1_fast[N_COARSE+5:N_COARSE];

  // ---- divider path: alignment delay, DSM, MMD -------------------------------------------
  fcw_t fcw_dly [ALIGN_DLY+1];
  assign fcw_dly[0] = fcw;
  for (genvar i = 1; i <= ALIGN_DLY; i++) begin : g_align
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) fcw_dly[i] <= DEF_FCW_START;
      else        fcw_dly[i] <= fcw_dly[i-1];
    end
  end

  dsm u_dsm (
    .clk, .rst_n, .en(1'b1), .fcw(fcw_dly[ALIGN_DLY]), .n_div, .dtc_code, .carry(dsm_carry)
  );

  mmd #(.MOD_W(FCW_INT + 1)) u_mmd (
    .clk_in(clk_div2), .rst_n, .modulus(n_div), .div_out
  );

endmodule
