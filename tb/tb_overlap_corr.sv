// tb_overlap_corr: self-checking testbench of overlap_corr.
// Builds a mismatched coarse bank (31 cells of 50000..60000 fine LSBs, so neighbouring
// coarse codes overlap the 16-bit fine range) and a fine bank with +-3% weight errors, then
// drives random and swept tuning words, one per clock. Checks, 2 clocks later:
//   * D_CTRLT is a thermometer code whose length D_M is the largest i with TH[i] <= tw;
//   * the bits D_CTRLB[15:5] are the greedy binary-search result against BIN[15..5];
//   * the word is rebuilt exactly: TH[D_M] + sum BIN[j]*D_CTRLB[j] + D_CTRLB[4:0] == tw,
//     whenever the residue fits in 5 bits (resid_over low), which it must for a fine bank
//     whose range exceeds one coarse step.
module tb_overlap_corr;
  import fmcw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  tw_t tw;
  tw_t th [1:N_COARSE];
  tw_t bin [N_RESID:N_FINE-1];
  logic [N_COARSE:1] d_ctrlt;
  logic [4:0] d_m;
  logic [N_FINE-1:0] d_ctrlb;
  logic resid_over;
  int checks = 0, failures = 0;
  int over_seen = 0, coarse_steps = 0;

  overlap_corr dut (.clk, .rst_n, .tw, .th, .bin, .d_ctrlt, .d_m, .d_ctrlb, .resid_over);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  tw_t q [$];
  logic [4:0] last_dm = '0;

  task automatic verify(input tw_t w);
    int m;
    longint res, rebuilt;
    logic [N_FINE-1:0] expb;
    m = 0;
    for (int i = 1; i <= N_COARSE; i++) if (th[i] <= w) m = i;
    check(d_m == 5'(m), $sformatf("D_M=%0d exp %0d (tw=%0d)", d_m, m, w));
    for (int i = 1; i <= N_COARSE; i++)
      check(d_ctrlt[i] == (i <= m), $sformatf("D_CTRLT[%0d]", i));
    res = longint'(w) - ((m == 0) ? 0 : longint'(th[m]));
    expb = '0;
    for (int j = N_FINE - 1; j >= int'(N_RESID); j--)
      if (res >= longint'(bin[j])) begin expb[j] = 1'b1; res -= longint'(bin[j]); end
    check(d_ctrlb[N_FINE-1:N_RESID] == expb[N_FINE-1:N_RESID], "D_CTRLB[15:5]");
    check(resid_over == (res > 31), "resid_over");
    if (resid_over) over_seen++;
    else begin
      rebuilt = ((m == 0) ? 0 : longint'(th[m])) + longint'(d_ctrlb[N_RESID-1:0]);
      for (int j = N_RESID; j < N_FINE; j++) if (d_ctrlb[j]) rebuilt += longint'(bin[j]);
      check(rebuilt == longint'(w), $sformatf("rebuild %0d != %0d", rebuilt, w));
    end
    if (d_m != last_dm) coarse_steps++;
    last_dm = d_m;
  endtask

  task automatic drive(input tw_t w);
    @(negedge clk);
    tw = w;
    q.push_back(w);
    if (q.size() > 2) verify(q.pop_front());
  endtask

  initial begin
    longint acc;
    acc = 0;
    for (int i = 1; i <= N_COARSE; i++) begin
      acc += 50000 + $urandom_range(0, 10000);
      th[i] = tw_t'(acc);
    end
    for (int j = N_RESID; j < N_FINE; j++)
      bin[j] = tw_t'(((1 << j) * (970 + $urandom_range(0, 60))) / 1000);
    tw = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) drive(tw_t'($urandom_range(0, int'(th[N_COARSE]) + 70000)));
    for (longint w = 0; w < longint'(th[N_COARSE]) + 60000; w += 997) drive(tw_t'(w));
    // a fine bank that is too weak cannot bridge a coarse step: residue overflows
    for (int j = N_RESID; j < N_FINE; j++) bin[j] = tw_t'((1 << j) / 2);
    for (int k = 0; k < 500; k++) drive(tw_t'($urandom_range(0, int'(th[N_COARSE]))));
    drive(tw); drive(tw); drive(tw);
    check(over_seen > 0, "residue overflow case reached");
    check(coarse_steps > 60, "coarse codes crossed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
