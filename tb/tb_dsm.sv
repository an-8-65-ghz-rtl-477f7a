// tb_dsm: self-checking testbench of the first-order delta-sigma modulator.
// For a constant Fcw = I + F/2^16, the sum of 2^16 consecutive ratios must be exactly
// I*2^16 + F (the average equals Fcw); each ratio must be I or I+1; and the DTC code must
// equal the top 10 bits of (k*F mod 2^16), computed here from the cycle count. A chirp-like
// ramp of Fcw checks that the running sum of ratios tracks the running sum of Fcw within 1.
module tb_dsm;
  import fmcw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  fcw_t fcw;
  logic [FCW_INT:0] n_div;
  logic [DTC_W-1:0] dtc_code;
  logic carry;
  int checks = 0, failures = 0;

  dsm dut (.clk, .rst_n, .en, .fcw, .n_div, .dtc_code, .carry);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic const_run(input int i_part, input int f_part);
    longint sum, acc;
    // restart from an empty accumulator
    en = 1'b0; rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    fcw = fcw_t'(i_part * 65536 + f_part);
    en = 1'b1;
    sum = 0; acc = 0;
    for (int k = 1; k <= 65536; k++) begin
      @(negedge clk);
      acc = (acc + f_part) % 65536;
      sum += longint'(n_div);
      if ((k % 61) == 0 || k < 50) begin
        check(n_div == 7'(i_part) || n_div == 7'(i_part + 1), "ratio range");
        check(dtc_code == 10'(acc >> 6), $sformatf("dtc %0d exp %0d", dtc_code, acc >> 6));
        check(carry == (n_div == 7'(i_part + 1)), "carry flag");
      end
    end
    check(sum == longint'(i_part) * 65536 + f_part, $sformatf("sum %0d", sum));
  endtask

  initial begin
    longint want, got;
    fcw = '0;
    repeat (2) @(negedge clk);
    const_run(50, 4);              // 50 + 2^-14, the fractional-N setting
    const_run(43, 16384);          // 43.25
    const_run(35, 49152 + 123);
    const_run(40, 0);
    // ramp
    en = 1'b0; rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    en = 1'b1;
    want = 0; got = 0;
    fcw = fcw_t'(35 * 65536 + 49152);
    for (int k = 0; k < 3000; k++) begin
      want += longint'(fcw);                 // in 2^-16 units
      @(negedge clk);
      got += longint'(n_div) * 65536;
      check(want - got >= 0 && want - got < 65536, "ramp tracking");
      fcw = ((k % 40) < 30) ? fcw + fcw_t'(32768 + (k % 7)) : fcw_t'(35 * 65536 + 49152);
    end
    // hold
    en = 1'b0;
    @(negedge clk);
    got = longint'(n_div);
    fcw = fcw_t'(60 * 65536);
    repeat (3) @(negedge clk);
    check(n_div == 7'(got), "enable low holds the output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
