// az_clkgen: clock generator of the online auto-zero offset calibration.
//
// The two sub comparators of the hysteretic comparator matter only while
// V_FB is near V_H or V_L, so their pre-amps can be auto-zeroed once per
// switching period in the longer of the two intervals: the off interval
// (1-D) by default, or the on interval (D) when az_in_d_i is set (output
// close to the input voltage). At the start of that interval this block
// runs one sequence of non-overlapping phases:
//   P2 off  -> gap (T_NOV) -> P1 and P1d on (sampling, T_P1)
//   -> P1 off, P1d still on for T_P1D (S1/S2 open before S3/S4, bottom-plate
//      sampling) -> gap (T_NOV) -> P2 on (settling)
// P2 is on whenever no sequence runs, connecting the inputs to the pre-amp.
// blank_o covers the whole sequence plus T_SETTLE cycles after P2 returns;
// it drives the OR gates in front of the RS latch.
//
// Interface: pwm_i is the master switching signal (high side on).
// Timing: the sequence starts T_WAIT cycles after the chosen pwm edge and
// lasts T_NOV+T_P1+T_P1D+T_NOV+T_SETTLE cycles; edges during a sequence are
// ignored. Phase order, the delayed P1d and the non-overlap follow the design
// description; all durations are this implementation's choices.
module az_clkgen #(
  parameter int unsigned T_WAIT   = 2,
  parameter int unsigned T_NOV    = 2,
  parameter int unsigned T_P1     = 24,
  parameter int unsigned T_P1D    = 4,
  parameter int unsigned T_SETTLE = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic pwm_i,
  input  logic az_in_d_i,   // 1: calibrate in the D interval instead of 1-D
  output logic p1_o,        // sampling switches S1, S2
  output logic p1d_o,       // delayed sampling switches S3, S4 and the mirror switch
  output logic p2_o,        // input switches (settling / normal operation)
  output logic blank_o,     // hold the RS latch inputs high
  output logic busy_o       // a sequence is running
);

  typedef enum logic [2:0] {IDLE, WAIT, GAP1, SAMPLE, HOLD, GAP2, SETTLE} state_e;

  localparam int unsigned CW = 8;

  state_e        state;
  logic [CW-1:0] cnt;
  logic          pwm_d;
  logic          start;

  // the interval starts at the falling edge (1-D) or the rising edge (D)
  assign start = az_in_d_i ? (pwm_i & ~pwm_d) : (~pwm_i & pwm_d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      pwm_d <= 1'b0;
    end else begin
      pwm_d <= pwm_i;
      if (!en) begin
        state <= IDLE;
        cnt   <= '0;
      end else begin
        cnt <= cnt + CW'(1);
        unique case (state)
          IDLE:   begin cnt <= '0; if (start) state <= (T_WAIT > 0) ? WAIT : GAP1; end
          WAIT:   if (cnt == CW'(T_WAIT - 1))   begin cnt <= '0; state <= GAP1;   end
          GAP1:   if (cnt == CW'(T_NOV - 1))    begin cnt <= '0; state <= SAMPLE; end
          SAMPLE: if (cnt == CW'(T_P1 - 1))     begin cnt <= '0; state <= HOLD;   end
          HOLD:   if (cnt == CW'(T_P1D - 1))    begin cnt <= '0; state <= GAP2;   end
          GAP2:   if (cnt == CW'(T_NOV - 1))    begin cnt <= '0; state <= SETTLE; end
          SETTLE: if (cnt == CW'(T_SETTLE - 1)) begin cnt <= '0; state <= IDLE;   end
          default: state <= IDLE;
        endcase
      end
    end
  end

  always_comb begin
    p1_o    = (state == SAMPLE);
    p1d_o   = (state == SAMPLE) || (state == HOLD);
    p2_o    = (state == IDLE) || (state == WAIT) || (state == SETTLE);
    blank_o = (state != IDLE) && (state != WAIT);
    busy_o  = (state != IDLE);
  end

  // P2 never overlaps the sampling phases
  a_nonoverlap: assert property (@(posedge clk) disable iff (!rst_n) !(p2_o && (p1_o || p1d_o)))
    else $error("az_clkgen: P2 overlaps P1/P1d");

  initial assert (T_NOV > 0 && T_P1 > 0 && T_P1D > 0 && T_SETTLE > 0 &&
                  T_WAIT < 256 && T_P1 < 256 && T_SETTLE < 256)
    else $error("az_clkgen: durations must be 1..255");

endmodule
