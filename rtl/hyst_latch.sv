// hyst_latch: RS latch of the master's hysteretic comparator, with the
// auto-zero blanking OR gates and the load-transient override.
//
// The hysteretic comparator is two sub comparators followed by an RS latch.
// The set input V_S goes low when the feedback node V_FB falls below the
// lower threshold V_L (turn the high-side PMOS on); the reset input V_R goes
// low when V_FB rises above the upper threshold V_H (turn it off). Both are
// active low. While a sub comparator is being auto-zeroed its outputs are
// meaningless, so two OR gates force V_S and V_R high during the auto-zero
// sampling and settling phases (blank_i) and the latch holds its state.
//
// Load-transient enhancement: an undershoot flag turns the low-side NMOS
// off (high side on) and an overshoot flag turns the high-side PMOS off,
// directly, bypassing the window, and the latch follows.
//
// Interface: all inputs synchronous to clk. pwm_o = 1 means the high side is
// on (the D interval); it is registered, one clk after the input change.
// Reset priority when both inputs are active is this implementation's
// choice, as are the exact override encoding and the reset state (off).
module hyst_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic cmp_s_n_i,   // low: V_FB < V_L
  input  logic cmp_r_n_i,   // low: V_FB > V_H
  input  logic blank_i,     // auto-zero in progress
  input  logic under_i,     // output undershoot detected
  input  logic over_i,      // output overshoot detected
  output logic v_s_o,       // V_S after its OR gate
  output logic v_r_o,       // V_R after its OR gate
  output logic pwm_o        // high-side on
);

  assign v_s_o = cmp_s_n_i | blank_i;
  assign v_r_o = cmp_r_n_i | blank_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       pwm_o <= 1'b0;
    else if (!en)     pwm_o <= 1'b0;
    else if (over_i)  pwm_o <= 1'b0;
    else if (under_i) pwm_o <= 1'b1;
    else if (!v_r_o)  pwm_o <= 1'b0;
    else if (!v_s_o)  pwm_o <= 1'b1;
  end

endmodule
