// tb_dlf: self-checking testbench of the PI loop filter.
// Random error samples and random gain shifts; the expected output is computed from an
// integer model written from the filter equations (prop = e*2^kp, integ += e*2^ki,
// y = prop + floor(integ/2^8), all saturating) and compared every clock, 1 clock after e.
// Also checks hold, clear and saturation.
module tb_dlf;
  import fmcw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, hold = 1'b0;
  logic signed [E_W-1:0] e;
  logic [3:0] kp, ki;
  logic signed [DLF_W-1:0] y;
  logic sat;
  int checks = 0, failures = 0, sat_seen = 0;

  dlf dut (.clk, .rst_n, .clear, .hold, .e, .kp_shift(kp), .ki_shift(ki), .y, .sat);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam longint ACC_LIM = (longint'(1) << (DLF_W + 8 + 1)) - 1;   // ACC_W = 26
  localparam longint Y_LIM   = (longint'(1) << (DLF_W - 1)) - 1;

  longint integ = 0;

  function automatic longint floor_div256(input longint v);
    return (v >= 0) ? v / 256 : -((-v + 255) / 256);
  endfunction

  task automatic step(input int ev, input bit h, input bit c);
    longint p, ysum, yexp, nxt;
    @(negedge clk);
    e = E_W'(ev); hold = h; clear = c;
    p = longint'(ev) << kp;
    ysum = p + floor_div256(integ);
    yexp = (ysum > Y_LIM) ? Y_LIM : (ysum < -Y_LIM - 1) ? -Y_LIM - 1 : ysum;
    nxt = integ + (longint'(ev) << ki);
    if (nxt > ACC_LIM) nxt = ACC_LIM;
    if (nxt < -ACC_LIM - 1) nxt = -ACC_LIM - 1;
    if (c) integ = 0; else if (!h) integ = nxt;
    @(posedge clk); #1;
    checks++;
    if (longint'(y) != yexp) begin
      failures++;
      if (failures < 10) $display("FAIL y=%0d exp=%0d", y, yexp);
    end
    if (sat) sat_seen++;
  endtask

  initial begin
    e = '0; kp = 4'd2; ki = 4'd1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      if (k % 500 == 0) begin kp = 4'($urandom_range(0, 6)); ki = 4'($urandom_range(0, 6)); end
      step($urandom_range(0, 200) - 100, (k % 300) > 280, (k % 1000) == 999);
    end
    // drive into saturation
    kp = 4'd6; ki = 4'd9;
    for (int k = 0; k < 600; k++) step(511, 1'b0, 1'b0);
    for (int k = 0; k < 600; k++) step(-512, 1'b0, 1'b0);
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
