// mmd: multi-modulus divider of the PLL feedback path.
//
// Divides its input clock (the oscillator output after the divide-by-2) by an integer
// modulus that may change every output period, as delivered by the delta-sigma modulator.
// The document only names this block. Here it is a synchronous down-counter: it counts
// modulus input clocks, raises div_out for one input clock at the end of each period and
// then loads the next modulus, so a ratio takes effect from the period after the one in
// which it is presented. Moduli below 2 are treated as 2.
//
// Interface: clk_in is the clock to divide; modulus must be stable around the terminal
// count (in the chip it is produced in the divided clock domain).
module mmd #(
  parameter int unsigned MOD_W = 7
) (
  input  logic             clk_in,
  input  logic             rst_n,
  input  logic [MOD_W-1:0] modulus,
  output logic             div_out
);

  logic [MOD_W-1:0] cnt_q;
  logic [MOD_W-1:0] mod_eff;
  assign mod_eff = (modulus < MOD_W'(2)) ? MOD_W'(2) : modulus;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      div_out <= 1'b0;
    end else if (cnt_q == '0) begin
      cnt_q   <= mod_eff - MOD_W'(1);
      div_out <= 1'b1;
    end else begin
      cnt_q   <= cnt_q - MOD_W'(1);
      div_out <= 1'b0;
    end
  end

endmodule
