// chirp_gen: frequency-control-word (Fcw) generator of the FMCW PLL.
//
// Produces one Fcw per reference clock cycle, the word that drives both modulation points
// of the PLL (the DPD/DCO path and the delta-sigma/divider path). Three modes:
//   CHIRP_CW  : Fcw held at fcw_start (fractional-N mode, no chirp).
//   CHIRP_SAW : sawtooth. Fcw rises by fcw_step per cycle for n_ramp cycles, from fcw_start
//               to fcw_start + n_ramp*fcw_step, then returns to fcw_start and stays there for
//               n_idle cycles (idle time) before the next ramp. Period n_ramp + max(n_idle,1).
//   CHIRP_TRI : triangle. n_ramp rising steps, then n_ramp falling steps. Period 2*n_ramp.
// The document gives the chirp shapes (sawtooth and triangle), the 10 GHz/us slope, 3 GHz
// bandwidth and 50 ns idle time; the counter-based state machine, the restart input and the
// port widths are this design's own choices. A slope of 10 GHz/us at a 100 MHz reference and
// a divide-by-2 before the divider is fcw_step = 0.5 (DEF_FCW_STEP).
// Arithmetic is modulo 2^FCW_W, so a negative fcw_step (two's complement) gives a
// down-chirp: the measured sawtooth of the design this follows falls at -10 GHz/us.
// "Rising", "top" and "turn" below then refer to the ramp direction, not to frequency.
//
// Interface: settings are sampled every cycle; restart (or reset) starts a new chirp at
// fcw_start. Timing: fcw is registered; ramp_start pulses in the cycle fcw first leaves
// fcw_start on a rising ramp, turn pulses in the cycle fcw reaches the top of the ramp.
module chirp_gen
  import fmcw_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  input  chirp_mode_e       mode,
  input  fcw_t              fcw_start,
  input  fcw_t              fcw_step,
  input  logic [CNT_W-1:0]  n_ramp,
  input  logic [CNT_W-1:0]  n_idle,
  output fcw_t              fcw,
  output logic              ramp_up,     // Fcw is rising this cycle
  output logic              ramp_start,  // first rising step of a ramp
  output logic              turn,        // top of the ramp reached
  output logic              idle         // sawtooth idle time
);

  typedef enum logic [1:0] {S_HOLD, S_UP, S_DOWN, S_IDLE} state_e;

  state_e           state_q;
  logic [CNT_W-1:0] cnt_q;

  // Number of idle cycles is at least one: the return to fcw_start takes a cycle.
  logic [CNT_W-1:0] idle_len;
  assign idle_len = (n_idle == '0) ? CNT_W'(1) : n_idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_HOLD;
      cnt_q   <= '0;
      fcw     <= DEF_FCW_START;
    end else if (restart) begin
      state_q <= (mode == CHIRP_CW) ? S_HOLD : S_IDLE;
      cnt_q   <= idle_len - CNT_W'(1);
      fcw     <= fcw_start;
    end else begin
      unique case (state_q)
        S_HOLD: begin
          fcw <= fcw_start;
          if (mode != CHIRP_CW) begin
            state_q <= S_IDLE;
            cnt_q   <= '0;
          end
        end
        S_IDLE: begin
          if (cnt_q == '0) begin
            // leave idle: first rising step
            state_q <= S_UP;
            cnt_q   <= n_ramp - CNT_W'(1);
            fcw     <= fcw_start + fcw_step;
          end else begin
            cnt_q <= cnt_q - CNT_W'(1);
            fcw   <= fcw_start;
          end
        end
        S_UP: begin
          if (cnt_q == '0) begin
            if (mode == CHIRP_TRI) begin
              state_q <= S_DOWN;
              cnt_q   <= n_ramp - CNT_W'(1);
              fcw     <= fcw - fcw_step;
            end else begin
              state_q <= S_IDLE;
              cnt_q   <= idle_len - CNT_W'(1);
              fcw     <= fcw_start;
            end
          end else begin
            cnt_q <= cnt_q - CNT_W'(1);
            fcw   <= fcw + fcw_step;
          end
        end
        S_DOWN: begin
          if (cnt_q == '0) begin
            state_q <= S_UP;
            cnt_q   <= n_ramp - CNT_W'(1);
            fcw     <= fcw + fcw_step;
          end else begin
            cnt_q <= cnt_q - CNT_W'(1);
            fcw   <= fcw - fcw_step;
          end
        end
        default: state_q <= S_HOLD;
      endcase
      if (mode == CHIRP_CW) begin
        state_q <= S_HOLD;
        fcw     <= fcw_start;
      end
    end
  end

  assign ramp_up    = (state_q == S_UP);
  assign idle       = (state_q == S_IDLE);
  assign ramp_start = (state_q == S_UP) && (cnt_q == n_ramp - CNT_W'(1));
  assign turn       = (state_q == S_UP) && (cnt_q == '0);

endmodule
