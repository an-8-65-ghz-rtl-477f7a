// tb_dpd_poly8: self-checking testbench of dpd_poly8.
// Random coefficient sets and a random stream of Fcw words, one per clock. The expected
// tuning word is the polynomial evaluated in floating point on the quantised variable
// x = (Fcw - center) * 2^-19 (saturated to |x| < 1) and rounded; the fixed-point Horner chain may differ
// by at most 1 LSB. The output is compared exactly 10 clocks after its input (latency) and
// a new word is accepted every clock (throughput). Out-of-range results must clip.
module tb_dpd_poly8;
  import fmcw_pkg::*;

  localparam int LAT = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  fcw_t fcw, center;
  coef_t coef [POLY_ORD+1];
  tw_t tw;
  logic clipped;
  int checks = 0, failures = 0;

  dpd_poly8 dut (.clk, .rst_n, .fcw, .fcw_center(center), .coef, .tw, .tw_clipped(clipped));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real  a [POLY_ORD+1];
  real  exp_q [$];

  function automatic real poly(input fcw_t f);
    longint d;
    real x, y;
    d = longint'(f) - longint'(center);
    if (d > 524287) d = 524287;                // x saturates to |x| < 1
    if (d < -524287) d = -524287;
    x = real'(d) / 524288.0;
    y = 0.0;
    for (int i = POLY_ORD; i >= 0; i--) y = y * x + a[i];
    return y;
  endfunction

  task automatic set_coefs(input int scale);
    for (int i = 0; i <= POLY_ORD; i++) begin
      longint c;
      if (i == 0)      c = longint'(1500000 + $urandom_range(0, 200000)) * 65536;
      else if (i == 1) c = longint'(600000 + $urandom_range(0, 100000)) * 65536;
      else             c = (longint'($urandom_range(0, 2 * scale)) - scale) * 65536
                           + longint'($urandom_range(0, 65535));
      coef[i] = coef_t'(c);
      a[i] = real'(c) / 65536.0;
    end
  endtask

  int clip_seen;

  task automatic stream(input int n, input bit wide);
    real e, got;
    exp_q.delete();
    for (int t = 0; t < n + LAT - 1; t++) begin
      @(negedge clk);
      if (t < n) begin
        fcw = wide ? fcw_t'($urandom_range(0, (1 << FCW_W) - 1))
                   : fcw_t'(int'(center) + int'($urandom_range(0, 2 * 480000)) - 480000);
        exp_q.push_back(poly(fcw));
      end
      if (t >= LAT - 1) begin
        @(posedge clk); #1;
        e = exp_q.pop_front();
        got = real'(tw);
        checks++;
        if (e < 0.0 || e > real'((1 << TW_W) - 1)) begin
          clip_seen++;
          if (!(clipped && ((e < 0.0 && tw == 0) || (e > 0.0 && tw == '1)))) begin
            failures++;
            $display("FAIL clip exp=%f tw=%0d", e, tw);
          end
        end else if ((got - e) > 1.01 || (e - got) > 1.01 || clipped) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d exp=%f tw=%0d", t, e, tw);
        end
      end
    end
  endtask

  initial begin
    center = fcw_t'(43 * 65536 + 16384);    // 43.25 -> 8.65 GHz
    fcw = center;
    set_coefs(100000);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin
      set_coefs(k == 0 ? 0 : 150000);
      repeat (LAT) @(negedge clk);
      stream(300, 1'b0);
    end
    // wide inputs drive x into saturation and the result out of range
    clip_seen = 0;
    set_coefs(0);
    coef[0] = coef_t'(longint'(3600000) * 65536); a[0] = 3600000.0;
    coef[1] = coef_t'(longint'(1000000) * 65536); a[1] = 1000000.0;
    repeat (LAT) @(negedge clk);
    stream(150, 1'b1);
    coef[0] = coef_t'(longint'(300000) * 65536);  a[0] = 300000.0;
    repeat (LAT) @(negedge clk);
    stream(150, 1'b1);
    checks++;
    if (clip_seen == 0) begin failures++; $display("FAIL no clipping case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
