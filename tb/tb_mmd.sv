// tb_mmd: self-checking testbench of the multi-modulus divider.
// A modulus sequence (random 2..127, plus 0 and 1 which act as 2) is applied; each new
// modulus is presented right after a div_out pulse and must set the length of the next
// period. The testbench measures every period in input clocks and compares it with the
// modulus it applied.
module tb_mmd;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [6:0] modulus;
  logic div_out;
  int checks = 0, failures = 0;

  mmd #(.MOD_W(7)) dut (.clk_in(clk), .rst_n, .modulus, .div_out);

  always #1 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period, expect_len, m;
    modulus = 7'd50;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // wait for the first pulse; from then on periods are measured
    do @(posedge clk); while (!div_out);
    expect_len = 50;
    for (int p = 0; p < 2000; p++) begin
      @(negedge clk);
      m = (p % 97 == 5) ? 0 : (p % 89 == 7) ? 1 : $urandom_range(2, 127);
      modulus = 7'(m);
      period = 0;
      do begin @(posedge clk); period++; end while (!div_out);
      checks++;
      if (period != expect_len) begin
        failures++;
        if (failures < 10) $display("FAIL period %0d exp %0d", period, expect_len);
      end
      expect_len = (m < 2) ? 2 : m;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
