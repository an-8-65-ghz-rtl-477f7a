// tb_precharge_delay_line: self-checking testbench of the pre-charge pulse model.
// Toggles random channels and checks that every falling edge of sw gives exactly one sw1
// pulse that starts T_DLY after the edge and lasts T_PW, that rising edges give none and
// that the other channels stay quiet.
`timescale 1ps / 1fs
module tb_precharge_delay_line;
  localparam int N = 37, TD = 5, TW = 30;

  logic [N-1:0] sw, sw1;
  int checks = 0, failures = 0;

  precharge_delay_line #(.N_CH(N), .T_DLY_PS(TD), .T_PW_PS(TW)) dut (.sw, .sw1);

  initial begin
    #10000000;
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

  initial begin
    int ch;
    sw = '1;
    #100;
    for (int k = 0; k < 300; k++) begin
      ch = $urandom_range(0, N - 1);
      // falling edge: pulse expected
      sw[ch] = 1'b0;
      #(TD - 1);
      check(sw1 == '0, "no pulse before the delay");
      #2;
      check(sw1 == (N'(1) << ch), $sformatf("pulse on channel %0d", ch));
      #(TW - 2);
      check(sw1[ch] == 1'b1, "pulse still high near its end");
      #2;
      check(sw1 == '0, "pulse ended");
      #20;
      // rising edge: no pulse
      sw[ch] = 1'b1;
      #(TD + TW / 2);
      check(sw1 == '0, "no pulse after a rising edge");
      #50;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
