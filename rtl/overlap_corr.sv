// overlap_corr: flash-quantizer-based overlap correction from tuning word to DCO banks.
//
// Splits the tuning word tw into the controls of the DCO's two switched-capacitor banks so
// that each bank position is used with its own measured weight, which removes the
// non-monotonic overlaps of the coarse/fine tuning curve:
//   1. Flash quantizer: tw is compared with the cumulative coarse weights TH[1..31]
//      (TH[i] = total weight of coarse cells 1..i, in fine-LSB units). The comparator outputs
//      form the thermometer code D_CTRLT[31:1]; their count is D_M; the quantization error
//      RES[1] = tw - TH[D_M] (TH[0] = 0) goes to the fine bank.
//   2. Cascaded quantizer: eleven 1-bit quantizers, from BIN[15] down to BIN[5], each set
//      D_CTRLB[j] when the running residue is at least BIN[j] and then subtract BIN[j].
//   3. What remains after the eleventh stage drives D_CTRLB[4:0] directly (nominal binary
//      weights 1..16); it is clipped to 31 and resid_over flags the clip.
// The structure (flash quantizer, per-cell cumulative weights, eleven 1-bit quantizers, last
// five bits from the final residue) follows the document. TH and BIN come from a foreground
// calibration done in software; they are register inputs here. The two pipeline registers
// (after the flash quantizer and at the output) are this design's choice.
//
// Timing: d_ctrlt, d_m, d_ctrlb and resid_over appear 2 clocks after tw; one tw per clock.
module overlap_corr
  import fmcw_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  tw_t                 tw,
  input  tw_t                 th  [1:N_COARSE],       // cumulative coarse weights TH[1..31]
  input  tw_t                 bin [N_RESID:N_FINE-1], // fine weights BIN[5..15]
  output logic [N_COARSE:1]   d_ctrlt,                // thermometer coarse control
  output logic [4:0]          d_m,                    // flash quantizer output (0..31)
  output logic [N_FINE-1:0]   d_ctrlb,                // binary fine control
  output logic                resid_over              // final residue exceeded 5 bits
);

  // ---- stage 1: flash quantizer --------------------------------------------------------
  logic [N_COARSE:1] therm;
  logic [4:0]        cnt;
  tw_t               th_sel;

  always_comb begin
    cnt    = '0;
    th_sel = '0;
    for (int i = 1; i <= N_COARSE; i++) begin
      therm[i] = (tw >= th[i]);
      if (therm[i]) cnt = cnt + 5'd1;
    end
    for (int i = 1; i <= N_COARSE; i++)
      if (cnt == 5'(i)) th_sel = th[i];
  end

  logic [N_COARSE:1] therm_q;
  logic [4:0]        dm_q;
  tw_t               res1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      therm_q <= '0;
      dm_q    <= '0;
      res1_q  <= '0;
    end else begin
      therm_q <= therm;
      dm_q    <= cnt;
      // a bubble-free code has tw >= TH[D_M]; clamp at zero otherwise
      res1_q  <= (tw >= th_sel) ? tw - th_sel : '0;
    end
  end

  // ---- stage 2: cascaded 1-bit quantizers ---------------------------------------------
  tw_t               res [N_RESID:N_FINE];      // res[16] = RES[1], res[5] = final residue
  logic [N_FINE-1:0] bits;

  always_comb begin
    res[N_FINE] = res1_q;
    bits        = '0;
    for (int j = N_FINE - 1; j >= int'(N_RESID); j--) begin
      bits[j] = (res[j+1] >= bin[j]);
      res[j]  = bits[j] ? res[j+1] - bin[j] : res[j+1];
    end
    if (res[N_RESID] > tw_t'((1 << N_RESID) - 1))
      bits[N_RESID-1:0] = '1;
    else
      bits[N_RESID-1:0] = res[N_RESID][N_RESID-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_ctrlt    <= '0;
      d_m        <= '0;
      d_ctrlb    <= '0;
      resid_over <= 1'b0;
    end else begin
      d_ctrlt    <= therm_q;
      d_m        <= dm_q;
      d_ctrlb    <= bits;
      resid_over <= (res[N_RESID] > tw_t'((1 << N_RESID) - 1));
    end
  end

endmodule
