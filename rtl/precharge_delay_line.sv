// precharge_delay_line: behavioural model of the pre-charge pulse generator of the DCO's
// fast-charging switched capacitors (not synthesizable logic: it models an analog delay line).
//
// When a switched-capacitor control SW falls (cell switched off), the bias resistors alone
// would recharge the drain/source nodes of the switch slowly and the DCO frequency would
// settle late. The pre-charge delay line therefore produces a short pulse SW1 right after
// each falling edge of SW; SW1 turns on helper transistors that pull the nodes to V_B
// quickly. The document applies this to the 31 thermometer coarse cells and to the first
// 6 bits of the fine bank (D_CTRLB[15:10]), which gives N_CH = 37 channels; that mapping and
// the function follow the document. The delay from SW falling to SW1 rising (T_DLY_PS) and
// the pulse width (T_PW_PS) are not given and are placeholder values of this model.
//
// Interface: sw[i] is the control of channel i, sw1[i] its pre-charge pulse. A rising edge
// of sw produces no pulse.
`timescale 1ps / 1fs
module precharge_delay_line #(
  parameter int unsigned N_CH     = 37,
  parameter int unsigned T_DLY_PS = 5,
  parameter int unsigned T_PW_PS  = 30
) (
  input  logic [N_CH-1:0] sw,
  output logic [N_CH-1:0] sw1
);

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    initial sw1[i] = 1'b0;
    always @(negedge sw[i]) begin
      #(T_DLY_PS) sw1[i] <= 1'b1;
      #(T_PW_PS)  sw1[i] <= 1'b0;
    end
  end

endmodule
