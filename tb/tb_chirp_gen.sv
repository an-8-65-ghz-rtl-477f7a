// tb_chirp_gen: self-checking testbench of chirp_gen.
// After each restart the expected word is computed from the cycle count alone:
//   sawtooth, period P = n_idle + n_ramp: p = t mod P; Fcw = start if p < n_idle,
//             else start + (p - n_idle + 1)*step;
//   triangle: n_idle cycles at start, then q = (t - n_idle) mod 2n; Fcw = start+(q+1)*step
//             for q < n, else start + (2n-1-q)*step;
//   constant: Fcw = start.
// Also counts ramp_start / turn pulses against the number of periods (chirp rate).
// A down-chirp is a negative fcw_step in two's complement; it is checked modulo 2^22.
module tb_chirp_gen;
  import fmcw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  chirp_mode_e mode = CHIRP_CW;
  fcw_t start_w, step_w, fcw;
  logic [15:0] n_ramp, n_idle;
  logic ramp_up, ramp_start, turn, idle;
  int checks = 0, failures = 0;

  chirp_gen dut (.clk, .rst_n, .restart, .mode, .fcw_start(start_w), .fcw_step(step_w),
                 .n_ramp, .n_idle, .fcw, .ramp_up, .ramp_start, .turn, .idle);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic run(input chirp_mode_e m, input int unsigned st, input int unsigned sp,
                     input int nr, input int ni, input int ncyc);
    int t, p, q, starts, turns;
    longint exp;
    mode = m; start_w = fcw_t'(st); step_w = fcw_t'(sp);
    n_ramp = 16'(nr); n_idle = 16'(ni);
    @(negedge clk) restart = 1'b1;
    @(negedge clk) restart = 1'b0;
    starts = 0; turns = 0;
    for (t = 0; t < ncyc; t++) begin
      if (m == CHIRP_CW) exp = st;
      else if (m == CHIRP_SAW) begin
        p = t % (ni + nr);
        exp = (p < ni) ? st : st + (p - ni + 1) * sp;
      end else begin
        if (t < ni) exp = st;
        else begin
          q = (t - ni) % (2 * nr);
          exp = (q < nr) ? st + (q + 1) * sp : st + (2 * nr - 1 - q) * sp;
        end
      end
      check(fcw == fcw_t'(exp), $sformatf("mode %0d t=%0d fcw=%0d exp=%0d", m, t, fcw, exp));
      if (ramp_start) starts++;
      if (turn) begin
        turns++;
        check(fcw == fcw_t'(st + nr * sp), "turn at top");
      end
      @(negedge clk);
    end
    if (m == CHIRP_SAW) begin
      check(starts == (ncyc - ni + ni + nr - 1) / (ni + nr), $sformatf("saw ramp count %0d", starts));
      check(turns == (ncyc - (ni + nr - 1) + ni + nr - 1) / (ni + nr), "saw turns");
    end else if (m == CHIRP_TRI) begin
      check(starts == ((ncyc - ni - 1) / (2 * nr)) + 1, $sformatf("tri ramp count %0d", starts));
    end else begin
      check(starts == 0 && turns == 0, "cw has no ramps");
    end
  endtask

  initial begin
    n_ramp = 16'd30; n_idle = 16'd5; start_w = DEF_FCW_START; step_w = DEF_FCW_STEP;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // the document's sawtooth: 10 GHz/us, 3 GHz in 300 ns, 50 ns idle, 100 MHz reference
    run(CHIRP_SAW, DEF_FCW_START, DEF_FCW_STEP, 30, 5, 350);
    run(CHIRP_TRI, DEF_FCW_START, DEF_FCW_STEP, 30, 1, 301);
    run(CHIRP_CW,  50 * 65536 + 4, 0, 30, 5, 50);   // fractional-N setting 50 + 2^-14
    run(CHIRP_SAW, 40 * 65536, 1311, 200, 3, 1000); // slow slope (0.2 GHz/us)
    run(CHIRP_TRI, 36 * 65536, 777, 7, 2, 200);
    // down-chirp: a negative step in two's complement, 10.2 GHz -> 7.1 GHz in 310 ns
    run(CHIRP_SAW, 51 * 65536, (1 << FCW_W) - 32768, 31, 5, 360);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
