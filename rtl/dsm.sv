// dsm: delta-sigma modulator of the divider path.
//
// Turns the fractional frequency control word Fcw (FCW_INT.FCW_FRAC) into a sequence of
// integer divide ratios whose average is Fcw, one per reference cycle, and gives the
// quantization phase residue to the DTC so that the sampling phase detector sees no
// fractional-N ramp.
// The document only names this block (with the DTC in a DTC-based sampling PLL). This design
// uses a first-order (single accumulator) modulator, the usual companion of a DTC: the
// accumulator content is exactly the phase the DTC must remove. Fcw may change every cycle,
// so the same block follows the chirp on the divider side of the two-point modulation.
//
// Each enabled clock:  acc' = acc + frac(Fcw);  carry = overflow;  n_div = int(Fcw) + carry;
// dtc_code = upper DTC_W bits of acc'. All outputs are registered (1 clock latency).
module dsm
  import fmcw_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  fcw_t                 fcw,
  output logic [FCW_INT:0]     n_div,     // integer divide ratio for the divider
  output logic [DTC_W-1:0]     dtc_code,  // accumulated phase residue for the DTC
  output logic                 carry      // this ratio was rounded up
);

  logic [FCW_FRAC-1:0] acc_q;
  logic [FCW_FRAC:0]   sum;
  assign sum = {1'b0, acc_q} + {1'b0, fcw[FCW_FRAC-1:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q    <= '0;
      n_div    <= '0;
      dtc_code <= '0;
      carry    <= 1'b0;
    end else if (en) begin
      acc_q    <= sum[FCW_FRAC-1:0];
      carry    <= sum[FCW_FRAC];
      n_div    <= {1'b0, fcw[FCW_W-1:FCW_FRAC]} + (FCW_INT+1)'(sum[FCW_FRAC]);
      dtc_code <= sum[FCW_FRAC-1 -: DTC_W];
    end
  end

endmodule
