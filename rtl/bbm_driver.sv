// bbm_driver: break-before-make gate control of one phase, with power-FET
// segmentation and burst-mode zero-cross turn-off.
//
// pwm_i = 1 asks for the high-side PMOS, 0 for the low-side NMOS. A side is
// switched on only after the other has been off for DT clk cycles, so the two
// are never on together (no shoot-through). Both FETs and their drivers are
// split 1:3: segment 0 is 25 % of the width and segment 1 the other 75 %;
// light_i switches segment 1 off. In burst mode (burst_i), a zero-cross flag
// (V_LX above ground while the low side is on: the inductor current is about
// to reverse) turns the low side off until the next high-side request, and
// the output is left to droop on the load.
//
// Interface: inputs synchronous to clk, outputs registered. hs_o/ls_o are
// the logical on states; hs_seg_o/ls_seg_o[1:0] drive the two segments.
// Break-before-make, the 3:1 segmentation and the zero-cross rule follow the
// design description; the dead time DT and the register timing are this
// implementation's choices.
module bbm_driver #(
  parameter int unsigned DT = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       pwm_i,
  input  logic       light_i,   // turn off the 75 % segment
  input  logic       burst_i,   // burst mode: allow zero-cross turn-off
  input  logic       zc_i,      // V_LX > 0 while the low side is on
  output logic       hs_o,
  output logic       ls_o,
  output logic [1:0] hs_seg_o,
  output logic [1:0] ls_seg_o,
  output logic       zc_off_o   // low side held off by the zero-cross rule
);

  localparam int unsigned CW = $clog2(DT + 2);

  logic [CW-1:0] hs_off_cnt, ls_off_cnt;   // cycles each side has been off
  logic          pwm_d;
  logic          hs_req, ls_req;

  assign hs_req = en & pwm_i;
  assign ls_req = en & ~pwm_i & ~zc_off_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs_o       <= 1'b0;
      ls_o       <= 1'b0;
      hs_off_cnt <= '0;
      ls_off_cnt <= '0;
      pwm_d      <= 1'b0;
      zc_off_o   <= 1'b0;
    end else begin
      pwm_d <= pwm_i;
      // zero-cross latch: set while the low side conducts, cleared by the
      // next high-side request or when burst mode is left
      if (!burst_i || (pwm_i && !pwm_d)) zc_off_o <= 1'b0;
      else if (ls_o && zc_i)             zc_off_o <= 1'b1;

      hs_o <= hs_req && (hs_o || (!ls_o && ls_off_cnt >= CW'(DT)));
      ls_o <= ls_req && !(ls_o && burst_i && zc_i) &&
              (ls_o || (!hs_o && hs_off_cnt >= CW'(DT)));

      if (hs_o)                   hs_off_cnt <= '0;
      else if (hs_off_cnt != '1)  hs_off_cnt <= hs_off_cnt + CW'(1);
      if (ls_o)                   ls_off_cnt <= '0;
      else if (ls_off_cnt != '1)  ls_off_cnt <= ls_off_cnt + CW'(1);
    end
  end

  assign hs_seg_o = {hs_o & ~light_i, hs_o};
  assign ls_seg_o = {ls_o & ~light_i, ls_o};

  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(hs_o && ls_o))
    else $error("bbm_driver: shoot-through");

endmodule
