// dlf: digital loop filter of the PLL.
//
// Proportional-integral filter of the digitised phase error e[k]. Its output is added to
// the DPD tuning word, which makes the loop correct whatever the predistortion leaves (the
// second point of the two-point modulation).
// The document only names this block. This design's choices: power-of-two gains set by
// shifts, an integrator with INT_FRAC fractional bits, saturation of integrator and output.
//   prop  = e << kp_shift
//   integ = integ + ((e << ki_shift) in units of 2^-INT_FRAC)
//   y     = sat(prop + integ / 2^INT_FRAC)
// hold freezes the integrator (open loop, e.g. during calibration sweeps); clear empties it.
// Timing: y is registered, 1 clock after e.
module dlf
  import fmcw_pkg::*;
#(
  parameter int unsigned INT_FRAC = 8,
  parameter int unsigned ACC_W    = DLF_W + INT_FRAC + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    hold,
  input  logic signed [E_W-1:0]   e,
  input  logic [3:0]              kp_shift,
  input  logic [3:0]              ki_shift,
  output logic signed [DLF_W-1:0] y,
  output logic                    sat          // output or integrator saturated
);

  localparam logic signed [ACC_W-1:0] ACC_MAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] ACC_MIN = {1'b1, {(ACC_W-1){1'b0}}};
  localparam logic signed [ACC_W-1:0] Y_MAX   = ACC_W'({1'b0, {(DLF_W-1){1'b1}}});
  localparam logic signed [ACC_W-1:0] Y_MIN   = -Y_MAX - ACC_W'(1);

  logic signed [ACC_W-1:0] integ_q;
  logic signed [ACC_W-1:0] e_ext, prop, inc;
  logic signed [ACC_W:0]   integ_sum;
  logic signed [ACC_W-1:0] integ_next;
  logic signed [ACC_W+1:0] y_sum;

  assign e_ext     = ACC_W'(e);
  assign prop      = e_ext <<< kp_shift;
  assign inc       = e_ext <<< ki_shift;
  assign integ_sum = (ACC_W+1)'(integ_q) + (ACC_W+1)'(inc);

  always_comb begin
    if (integ_sum > (ACC_W+1)'(ACC_MAX))      integ_next = ACC_MAX;
    else if (integ_sum < (ACC_W+1)'(ACC_MIN)) integ_next = ACC_MIN;
    else                                      integ_next = ACC_W'(integ_sum);
    y_sum = (ACC_W+2)'(prop) + (ACC_W+2)'(integ_q >>> INT_FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ_q <= '0;
      y       <= '0;
      sat     <= 1'b0;
    end else begin
      if (clear)      integ_q <= '0;
      else if (!hold) integ_q <= integ_next;
      if (y_sum > (ACC_W+2)'(Y_MAX)) begin
        y <= DLF_W'(Y_MAX); sat <= 1'b1;
      end else if (y_sum < (ACC_W+2)'(Y_MIN)) begin
        y <= DLF_W'(Y_MIN); sat <= 1'b1;
      end else begin
        y <= DLF_W'(y_sum);
        sat <= (integ_next == ACC_MAX) || (integ_next == ACC_MIN);
      end
    end
  end

endmodule
