// dpd_poly8: 8th-order polynomial digital predistortion (8OP-DPD).
//
// Maps the frequency control word Fcw to the DCO tuning word tw through a polynomial
// that approximates the inverse of the DCO tuning curve:
//     tw = a0 + a1*x + a2*x^2 + ... + a8*x^8
// The 9 coefficients come from a foreground calibration done in software (a sweep of tw
// against the measured DCO frequency, then a fit); they are register inputs here. Lower
// orders (2nd ... 7th, as compared in the document) are obtained by zeroing the upper
// coefficients. The polynomial and its order follow the document.
//
// This design's own choices: the polynomial is taken in a normalised variable
//     x = (Fcw - fcw_center) * 2^(FCW_FRAC - X_SHIFT - X_W + 1)
// (with the defaults x = (Fcw - fcw_center)/8 at the full Fcw resolution, so |x| < 1 over a
// 7.15-10.15 GHz band) which is
// the same polynomial family as one in Fcw, only with better-conditioned coefficients. It is
// evaluated by Horner's rule in a fully pipelined chain of 8 multiply-add stages, so one new
// Fcw is accepted every clock. Coefficients and the accumulator are signed fixed point with
// COEF_FRAC fractional bits; each product is truncated back to that format and every stage
// saturates. The result is rounded to an integer and clipped to 0 .. 2^TW_W-1.
//
// Timing: tw appears LATENCY = POLY_ORD + 2 clocks after fcw (1 normalise, 8 Horner,
// 1 round/clip). Coefficients are treated as static while a chirp runs.
module dpd_poly8
  import fmcw_pkg::*;
#(
  parameter int unsigned X_SHIFT = 0   // (Fcw - center) >>> X_SHIFT gives x in Q1.(X_W-1)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  fcw_t   fcw,
  input  fcw_t   fcw_center,
  input  coef_t  coef [POLY_ORD+1],   // coef[i] multiplies x^i
  output tw_t    tw,
  output logic   tw_clipped         // tw was limited to its range this cycle
);

  localparam int unsigned PROD_W  = COEF_W + X_W;
  localparam int unsigned D_W     = FCW_W + 1;

  localparam coef_t ACC_MAX = {1'b0, {(COEF_W-1){1'b1}}};
  localparam coef_t ACC_MIN = {1'b1, {(COEF_W-1){1'b0}}};

  // ---- stage 0: normalise -------------------------------------------------------------
  logic signed [D_W-1:0] diff;
  logic signed [D_W-1:0] diff_sh;
  xnorm_t                x_sat;
  assign diff    = $signed({1'b0, fcw}) - $signed({1'b0, fcw_center});
  assign diff_sh = diff >>> X_SHIFT;
  always_comb begin
    if (diff_sh > D_W'(signed'({1'b0, {(X_W-1){1'b1}}})))
      x_sat = {1'b0, {(X_W-1){1'b1}}};
    else if (diff_sh < -D_W'(signed'({1'b0, {(X_W-1){1'b1}}})))
      x_sat = {1'b1, {(X_W-2){1'b0}}, 1'b1};
    else
      x_sat = xnorm_t'(diff_sh);
  end

  // x travels along the pipeline next to the partial result
  xnorm_t x_q  [POLY_ORD+1];
  coef_t  y_q  [POLY_ORD+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q[0] <= '0;
      y_q[0] <= '0;
    end else begin
      x_q[0] <= x_sat;
      y_q[0] <= coef[POLY_ORD];       // Horner starts from the top coefficient
    end
  end

  // ---- stages 1..8: y <- y*x + a[8-k] --------------------------------------------------
  for (genvar k = 1; k <= POLY_ORD; k++) begin : g_horner
    logic signed [PROD_W-1:0]   prod;
    logic signed [PROD_W-1:0]   prod_sh;
    logic signed [PROD_W:0]     sum;
    coef_t                      sum_sat;

    assign prod    = y_q[k-1] * x_q[k-1];
    assign prod_sh = prod >>> (X_W - 1);
    assign sum     = (PROD_W+1)'(prod_sh) + (PROD_W+1)'(coef[POLY_ORD-k]);

    always_comb begin
      if (sum > (PROD_W+1)'(ACC_MAX))      sum_sat = ACC_MAX;
      else if (sum < (PROD_W+1)'(ACC_MIN)) sum_sat = ACC_MIN;
      else                                 sum_sat = coef_t'(sum);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x_q[k] <= '0;
        y_q[k] <= '0;
      end else begin
        x_q[k] <= x_q[k-1];
        y_q[k] <= sum_sat;
      end
    end
  end

  // ---- output: round to integer, clip to the tuning-word range ------------------------
  logic signed [COEF_W:0] rounded;
  logic signed [COEF_W:0] int_part;
  assign rounded  = (COEF_W+1)'(y_q[POLY_ORD]) + (COEF_W+1)'(1 << (COEF_FRAC - 1));
  assign int_part = rounded >>> COEF_FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tw         <= '0;
      tw_clipped <= 1'b0;
    end else if (int_part < 0) begin
      tw         <= '0;
      tw_clipped <= 1'b1;
    end else if (int_part > (COEF_W+1)'({TW_W{1'b1}})) begin
      tw         <= '1;
      tw_clipped <= 1'b1;
    end else begin
      tw         <= tw_t'(int_part);
      tw_clipped <= 1'b0;
    end
  end

endmodule
